// Video timing generator of the display side.
//
// Two counters walk a frame of (H_ACTIVE + H_FP + H_SYNC + H_BP) x
// (V_ACTIVE + V_FP + V_SYNC + V_BP) clocks: active lines first, then the
// front porch, sync and back porch, and within a line the active pixels
// first. In the active area the generator takes one word from the frame
// reader per pixel (req with avail) and sends its low 24 bits; if no word is
// there it sends black and counts an underflow. fsync pulses at the first
// blank line after the active area, so the frame reader can set up and
// prefetch the next frame during vertical blanking. After reset the counters
// start at that line, so fsync comes first.
// Timing: outputs are registered, one cycle after the word is taken.
// The document gives the function, the 1280x720 size at 60 frames/s and the
// 72.5 MHz display clock; the blanking intervals are this design's choice:
// the 720p porches and sync widths with the horizontal back porch cut from
// 220 to 180 clocks, so a 1610 x 750 frame at 72.5 MHz gives 60.04 frames/s.
module video_gen #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 180,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        avail,
  input  logic [31:0] pix,
  output logic        req,
  output logic        fsync,
  output logic        vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [23:0] data_o,
  output logic [31:0] underflows
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  logic [HW-1:0] h;
  logic [VW-1:0] v;
  logic          h_act, v_act, active;

  assign h_act  = (h < HW'(H_ACTIVE));
  assign v_act  = (v < VW'(V_ACTIVE));
  assign active = h_act && v_act;
  assign req    = active && avail;

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0;
      v <= VW'(V_ACTIVE);
      {vsync_o, hsync_o, de_o, fsync} <= '0;
      {vblank_o, hblank_o} <= 2'b11;
      data_o     <= '0;
      underflows <= '0;
    end else begin
      if (h == HW'(H_TOTAL - 1)) begin
        h <= '0;
        v <= (v == VW'(V_TOTAL - 1)) ? '0 : v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
      fsync    <= (v == VW'(V_ACTIVE)) && (h == '0);
      de_o     <= active;
      hblank_o <= !h_act;
      vblank_o <= !v_act;
      hsync_o  <= (h >= HW'(H_ACTIVE + H_FP)) && (h < HW'(H_ACTIVE + H_FP + H_SYNC));
      vsync_o  <= (v >= VW'(V_ACTIVE + V_FP)) && (v < VW'(V_ACTIVE + V_FP + V_SYNC));
      data_o   <= req ? pix[23:0] : 24'h0;
      if (active && !avail) underflows <= underflows + 1'b1;
    end
  end
endmodule
