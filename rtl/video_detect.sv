// Video detection: measures the resolution of the incoming stream and marks
// the start of each frame.
//
// h_res is the length of the last DATA_VALID run (active pixels per line);
// v_res counts the DATA_VALID runs between two VSYNC rising edges (active
// lines per frame) and is updated at each rising edge, which also raises
// fsync for one cycle. res_valid is set once a whole frame has been counted.
// fsync is the frame-start pulse that starts the frame-buffer writer and the
// background-modelling pipeline.
// Timing: video delayed 1 cycle; fsync in the same cycle as the delayed
// VSYNC rising edge.
// The document names the function and the fsync output; how it measures is
// this design's choice.
module video_detect (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [23:0] data_i,
  output logic        vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [23:0] data_o,
  output logic        fsync,
  output logic [11:0] h_res,
  output logic [11:0] v_res,
  output logic        res_valid
);
  logic [11:0] hcnt, vcnt;
  logic        vs_q, de_q, seen_vs;

  always_ff @(posedge clk) begin
    if (rst) begin
      {vsync_o, hsync_o, de_o} <= '0;
      {vblank_o, hblank_o}     <= 2'b11;
      data_o    <= '0;
      fsync     <= 1'b0;
      hcnt      <= '0;
      vcnt      <= '0;
      h_res     <= '0;
      v_res     <= '0;
      res_valid <= 1'b0;
      vs_q      <= 1'b0;
      de_q      <= 1'b0;
      seen_vs   <= 1'b0;
    end else begin
      {vsync_o, hsync_o, vblank_o, hblank_o, de_o} <= {vsync_i, hsync_i, vblank_i, hblank_i, de_i};
      data_o <= data_i;
      vs_q   <= vsync_i;
      de_q   <= de_i;
      fsync  <= vsync_i && !vs_q;
      if (de_i) hcnt <= de_q ? hcnt + 1'b1 : 12'd1;
      if (!de_i && de_q) begin
        h_res <= hcnt;
        vcnt  <= vcnt + 1'b1;
      end
      if (vsync_i && !vs_q) begin
        vcnt    <= '0;
        seen_vs <= 1'b1;
        if (seen_vs) begin
          v_res     <= vcnt;
          res_valid <= 1'b1;
        end
      end
    end
  end
endmodule
