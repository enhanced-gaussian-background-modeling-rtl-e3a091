// Video preprocessing pipeline: camera CCIR656 bytes in, RGB video and a
// frame-start pulse out.
//
// The stages follow each other as in the camera input chain: CCIR656
// decoder, stuck pixel correction, brightness/contrast, Bayer-to-RGB
// interpolation, colour correction, image statistics, gamma correction and
// video detection. All stages run on the camera pixel clock, one pixel per
// cycle, and carry the XVSI sync signals with their data. The vendor cores'
// register interfaces are replaced by plain configuration ports.
// Timing: 5 + 3 + 2 + 2 + 1 + 1 + 1 + 1 = 16 cycles from camera byte to RGB
// output.
module preproc_pipeline #(
  parameter int unsigned H_ACTIVE = 1280
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cam_vsync,
  input  logic        cam_hsync,
  input  logic [7:0]  cam_data,
  // configuration
  input  logic [7:0]  spc_thresh,
  input  logic [8:0]  bc_contrast,
  input  logic signed [8:0] bc_brightness,
  input  logic [8:0]  cc_gain_r, cc_gain_g, cc_gain_b,
  input  logic        lut_we,
  input  logic [1:0]  lut_sel,
  input  logic [7:0]  lut_addr,
  input  logic [7:0]  lut_wdata,
  output logic        lut_ready,
  // status
  output logic [23:0] stats_max,
  output logic [23:0] stats_min,
  output logic        stats_valid,
  output logic [11:0] h_res,
  output logic [11:0] v_res,
  output logic        res_valid,
  // XVSI RGB stream to the frame-buffer writer
  output logic        vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [23:0] data_o,
  output logic        fsync
);
  typedef struct packed { logic vs, hs, vb, hb, de; } sync_t;
  sync_t s1, s2, s3, s4, s5, s6, s7;
  logic [7:0]  d1, d2, d3;
  logic [23:0] d4, d5, d6, d7;

  ccir656_decoder u_dec (.clk, .rst, .cam_vsync, .cam_hsync, .cam_data,
    .vsync_o(s1.vs), .hsync_o(s1.hs), .vblank_o(s1.vb), .hblank_o(s1.hb), .de_o(s1.de), .data_o(d1));

  stuck_pixel_corr u_spc (.clk, .rst, .thresh(spc_thresh),
    .vsync_i(s1.vs), .hsync_i(s1.hs), .vblank_i(s1.vb), .hblank_i(s1.hb), .de_i(s1.de), .data_i(d1),
    .vsync_o(s2.vs), .hsync_o(s2.hs), .vblank_o(s2.vb), .hblank_o(s2.hb), .de_o(s2.de), .data_o(d2));

  bright_contrast u_bc (.clk, .rst, .contrast(bc_contrast), .brightness(bc_brightness),
    .vsync_i(s2.vs), .hsync_i(s2.hs), .vblank_i(s2.vb), .hblank_i(s2.hb), .de_i(s2.de), .data_i(d2),
    .vsync_o(s3.vs), .hsync_o(s3.hs), .vblank_o(s3.vb), .hblank_o(s3.hb), .de_o(s3.de), .data_o(d3));

  bayer_interp #(.H_ACTIVE(H_ACTIVE)) u_li (.clk, .rst,
    .vsync_i(s3.vs), .hsync_i(s3.hs), .vblank_i(s3.vb), .hblank_i(s3.hb), .de_i(s3.de), .data_i(d3),
    .vsync_o(s4.vs), .hsync_o(s4.hs), .vblank_o(s4.vb), .hblank_o(s4.hb), .de_o(s4.de), .data_o(d4));

  color_balance u_cc (.clk, .rst, .gain_r(cc_gain_r), .gain_g(cc_gain_g), .gain_b(cc_gain_b),
    .vsync_i(s4.vs), .hsync_i(s4.hs), .vblank_i(s4.vb), .hblank_i(s4.hb), .de_i(s4.de), .data_i(d4),
    .vsync_o(s5.vs), .hsync_o(s5.hs), .vblank_o(s5.vb), .hblank_o(s5.hb), .de_o(s5.de), .data_o(d5));

  image_stats u_stats (.clk, .rst,
    .vsync_i(s5.vs), .hsync_i(s5.hs), .vblank_i(s5.vb), .hblank_i(s5.hb), .de_i(s5.de), .data_i(d5),
    .vsync_o(s6.vs), .hsync_o(s6.hs), .vblank_o(s6.vb), .hblank_o(s6.hb), .de_o(s6.de), .data_o(d6),
    .max_rgb(stats_max), .min_rgb(stats_min), .stats_valid);

  gamma_lut u_gamma (.clk, .rst, .lut_we, .lut_sel, .lut_addr, .lut_wdata, .init_done(lut_ready),
    .vsync_i(s6.vs), .hsync_i(s6.hs), .vblank_i(s6.vb), .hblank_i(s6.hb), .de_i(s6.de), .data_i(d6),
    .vsync_o(s7.vs), .hsync_o(s7.hs), .vblank_o(s7.vb), .hblank_o(s7.hb), .de_o(s7.de), .data_o(d7));

  video_detect u_det (.clk, .rst,
    .vsync_i(s7.vs), .hsync_i(s7.hs), .vblank_i(s7.vb), .hblank_i(s7.hb), .de_i(s7.de), .data_i(d7),
    .vsync_o, .hsync_o, .vblank_o, .hblank_o, .de_o, .data_o, .fsync, .h_res, .v_res, .res_valid);
endmodule
