// Display preparation pipeline: shows the classification frame on the
// monitor.
//
// A frame-buffer reader (the display VDMA) fetches the classification frame
// over its VFBC read port; the video generator requests one word per active
// pixel and frames the video with blanking and sync; the video output stage
// drives the DVI transmitter. The generator's fsync starts the reader at
// each frame, so the reader prefetches during vertical blanking.
// Everything runs in the display clock domain.
// Timing: the DVI pins follow the generator's counters by 2 cycles.
module display_pipeline #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 180,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20,
  parameter logic [30:0] FB_BASE  = 31'h00C0_0000
) (
  input  logic        clk,
  input  logic        rst,
  // VFBC5: read classification frame
  output logic [31:0] cmd_data,
  output logic        cmd_write,
  input  logic        cmd_full,
  input  logic [31:0] rd_data,
  input  logic        rd_empty,
  output logic        rd_read,
  // DVI transmitter
  output logic        dvi_de,
  output logic        dvi_hsync,
  output logic        dvi_vsync,
  output logic [11:0] dvi_data_rise,
  output logic [11:0] dvi_data_fall,
  output logic        dvi_reset_n,
  output logic [31:0] underflows
);
  logic        fsync, req, avail, vs, hs, vb, hb, de;
  logic [31:0] word;
  logic [23:0] rgb;
  logic        active_unused;

  vfbc_reader #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BASE_ADDR(FB_BASE)) u_rd (
    .clk, .rst, .vsync(fsync), .cmd_data, .cmd_write, .cmd_full,
    .rd_data, .rd_empty, .rd_read, .req, .avail, .data(word), .frame_active(active_unused));

  video_gen #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
              .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)) u_gen (
    .clk, .rst, .avail, .pix(word), .req, .fsync,
    .vsync_o(vs), .hsync_o(hs), .vblank_o(vb), .hblank_o(hb), .de_o(de), .data_o(rgb), .underflows);

  video_out u_out (.clk, .rst, .vsync_i(vs), .hsync_i(hs), .vblank_i(vb), .hblank_i(hb), .de_i(de),
    .data_i(rgb), .dvi_de, .dvi_hsync, .dvi_vsync, .dvi_data_rise, .dvi_data_fall, .dvi_reset_n);
endmodule
