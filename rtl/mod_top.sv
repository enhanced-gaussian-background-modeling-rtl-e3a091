// Real-time moving object detection system: camera in, foreground mask on
// the monitor, with the background model kept in external frame memory.
//
// Three pipelines share an external multi-port memory controller through six
// VFBC ports, which are this module's array ports:
//   port 0  preprocessing VDMA writes each RGB camera frame (two frame stores)
//   port 1  SG pipeline writes the classification frame
//   port 2  SG pipeline writes the updated mean/sigma frame
//   port 3  SG pipeline reads the last complete camera frame
//   port 4  SG pipeline reads the mean/sigma frame
//   port 5  display VDMA reads the classification frame
// Ports 0-4 run on the camera pixel clock (cam_clk), port 5 on the display
// clock (disp_clk); the memory controller crosses between them.
// The frame-start pulse of the video detector starts both the VDMA write of
// frame n and the SG pipeline, which then processes frame n-1 from the other
// frame store, so it never reads a store that is being written.
// Memory map (byte addresses): camera stores at PIX_BASE and
// PIX_BASE + FSTORE_BYTES, mean/sigma at MS_BASE, classification at FB_BASE.
// For read ports the write-data outputs are driven low, and for write ports
// the read-data inputs are unused; they are kept so that all six ports have
// the same shape.
// The preprocessing chain's VSYNC/HSYNC/VBLANK/HBLANK outputs and the VDMA
// writer's frame-active flag are left unconnected here: the writer needs only
// the frame-start pulse and DATA_VALID, and lint reports them as unused.
// The pipelines, their order and the port use follow the document's system
// figures; the memory map and the plain configuration ports are this
// design's choices.
module mod_top
  import mod_pkg::*;
#(
  parameter int unsigned H_ACTIVE     = 1280,
  parameter int unsigned V_ACTIVE     = 720,
  parameter int unsigned H_FP         = 110,
  parameter int unsigned H_SYNC       = 40,
  parameter int unsigned H_BP         = 180,
  parameter int unsigned V_FP         = 5,
  parameter int unsigned V_SYNC       = 5,
  parameter int unsigned V_BP         = 20,
  parameter logic [30:0] PIX_BASE     = 31'h0000_0000,
  parameter logic [30:0] FSTORE_BYTES = 31'h0040_0000,
  parameter logic [30:0] MS_BASE      = 31'h0080_0000,
  parameter logic [30:0] FB_BASE      = 31'h00C0_0000,
  parameter logic [15:0] A_Q16        = 16'd65472,
  parameter logic [15:0] B_Q16        = 16'd64,
  parameter logic [15:0] K_Q8         = 16'd589,
  parameter logic [15:0] TH_Q8        = 16'd768
) (
  input  logic        cam_clk,
  input  logic        cam_rst,
  input  logic        disp_clk,
  input  logic        disp_rst,
  // camera
  input  logic        cam_vsync,
  input  logic        cam_hsync,
  input  logic [7:0]  cam_data,
  // preprocessing configuration and status
  input  logic [7:0]  spc_thresh,
  input  logic [8:0]  bc_contrast,
  input  logic signed [8:0] bc_brightness,
  input  logic [8:0]  cc_gain_r, cc_gain_g, cc_gain_b,
  input  logic        lut_we,
  input  logic [1:0]  lut_sel,
  input  logic [7:0]  lut_addr,
  input  logic [7:0]  lut_wdata,
  output logic        lut_ready,
  output logic [23:0] stats_max,
  output logic [23:0] stats_min,
  output logic        stats_valid,
  output logic [11:0] h_res,
  output logic [11:0] v_res,
  output logic        res_valid,
  // six VFBC ports of the memory controller
  output logic [31:0] vfbc_cmd_data  [6],
  output logic        vfbc_cmd_write [6],
  input  logic        vfbc_cmd_full  [6],
  output logic [31:0] vfbc_wd_data   [6],
  output logic        vfbc_wd_write  [6],
  input  logic        vfbc_wd_full   [6],
  input  logic [31:0] vfbc_rd_data   [6],
  input  logic        vfbc_rd_empty  [6],
  output logic        vfbc_rd_read   [6],
  // DVI transmitter
  output logic        dvi_de,
  output logic        dvi_hsync,
  output logic        dvi_vsync,
  output logic [11:0] dvi_data_rise,
  output logic [11:0] dvi_data_fall,
  output logic        dvi_reset_n,
  // status
  output logic        vdma_overflow,
  output logic        sg_overflow,
  output logic        sg_busy,
  output logic [31:0] disp_underflows
);
  logic        vs, hs, vb, hb, de, fsync, vdma_active;
  logic [23:0] rgb;

  preproc_pipeline #(.H_ACTIVE(H_ACTIVE)) u_pre (
    .clk(cam_clk), .rst(cam_rst), .cam_vsync, .cam_hsync, .cam_data,
    .spc_thresh, .bc_contrast, .bc_brightness, .cc_gain_r, .cc_gain_g, .cc_gain_b,
    .lut_we, .lut_sel, .lut_addr, .lut_wdata, .lut_ready,
    .stats_max, .stats_min, .stats_valid, .h_res, .v_res, .res_valid,
    .vsync_o(vs), .hsync_o(hs), .vblank_o(vb), .hblank_o(hb), .de_o(de), .data_o(rgb), .fsync);

  // VFBC0: VDMA write of the camera frames, ping-pong over two stores
  vfbc_writer #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BASE_ADDR(PIX_BASE),
                .NUM_FSTORES(2), .FSTORE_BYTES(FSTORE_BYTES)) u_vdma_wr (
    .clk(cam_clk), .rst(cam_rst), .vsync(fsync), .de, .data({8'h00, rgb}),
    .cmd_data(vfbc_cmd_data[0]), .cmd_write(vfbc_cmd_write[0]), .cmd_full(vfbc_cmd_full[0]),
    .wd_data(vfbc_wd_data[0]), .wd_write(vfbc_wd_write[0]), .wd_full(vfbc_wd_full[0]),
    .overflow(vdma_overflow), .frame_active(vdma_active));
  assign vfbc_rd_read[0] = 1'b0;

  // VFBC1..4: enhanced single-Gaussian background modelling
  sg_pipeline #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .PIX_BASE(PIX_BASE), .PIX_FSTORES(2),
                .FSTORE_BYTES(FSTORE_BYTES), .MS_BASE(MS_BASE), .FB_BASE(FB_BASE),
                .A_Q16(A_Q16), .B_Q16(B_Q16), .K_Q8(K_Q8), .TH_Q8(TH_Q8)) u_sg (
    .clk(cam_clk), .rst(cam_rst), .vsync(fsync),
    .pix_cmd_data(vfbc_cmd_data[3]), .pix_cmd_write(vfbc_cmd_write[3]), .pix_cmd_full(vfbc_cmd_full[3]),
    .pix_rd_data(vfbc_rd_data[3]), .pix_rd_empty(vfbc_rd_empty[3]), .pix_rd_read(vfbc_rd_read[3]),
    .msr_cmd_data(vfbc_cmd_data[4]), .msr_cmd_write(vfbc_cmd_write[4]), .msr_cmd_full(vfbc_cmd_full[4]),
    .msr_rd_data(vfbc_rd_data[4]), .msr_rd_empty(vfbc_rd_empty[4]), .msr_rd_read(vfbc_rd_read[4]),
    .msw_cmd_data(vfbc_cmd_data[2]), .msw_cmd_write(vfbc_cmd_write[2]), .msw_cmd_full(vfbc_cmd_full[2]),
    .msw_wd_data(vfbc_wd_data[2]), .msw_wd_write(vfbc_wd_write[2]), .msw_wd_full(vfbc_wd_full[2]),
    .cls_cmd_data(vfbc_cmd_data[1]), .cls_cmd_write(vfbc_cmd_write[1]), .cls_cmd_full(vfbc_cmd_full[1]),
    .cls_wd_data(vfbc_wd_data[1]), .cls_wd_write(vfbc_wd_write[1]), .cls_wd_full(vfbc_wd_full[1]),
    .overflow(sg_overflow), .busy(sg_busy));
  assign vfbc_rd_read[1] = 1'b0;
  assign vfbc_rd_read[2] = 1'b0;
  assign vfbc_wd_data[3] = '0;
  assign vfbc_wd_write[3] = 1'b0;
  assign vfbc_wd_data[4] = '0;
  assign vfbc_wd_write[4] = 1'b0;

  // VFBC5: display of the classification frame
  display_pipeline #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
                     .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
                     .FB_BASE(FB_BASE)) u_disp (
    .clk(disp_clk), .rst(disp_rst),
    .cmd_data(vfbc_cmd_data[5]), .cmd_write(vfbc_cmd_write[5]), .cmd_full(vfbc_cmd_full[5]),
    .rd_data(vfbc_rd_data[5]), .rd_empty(vfbc_rd_empty[5]), .rd_read(vfbc_rd_read[5]),
    .dvi_de, .dvi_hsync, .dvi_vsync, .dvi_data_rise, .dvi_data_fall, .dvi_reset_n,
    .underflows(disp_underflows));
  assign vfbc_wd_data[5] = '0;
  assign vfbc_wd_write[5] = 1'b0;
endmodule
