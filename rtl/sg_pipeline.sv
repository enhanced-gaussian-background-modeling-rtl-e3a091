// Enhanced SG background modeling pipeline.
//
// Each frame, started by a one-cycle vsync (the frame-start pulse of the
// video detect block), two frame readers request the gray/RGB pixel frame
// and the previous background model frame ({mean, sigma} per pixel) from
// two VFBC read ports. A pixel and its model word are taken together
// whenever both read FIFOs hold a word; this joint DATA_VALID, and vsync,
// travel through 85-cycle delay lines beside the algorithm logic, so that
// the two frame writers store the classification word and the updated
// model word of the same pixel 85 cycles later. The model frame is read
// and rewritten in place: the write of a pixel trails its read. When a
// read FIFO runs empty the stream simply pauses (no DATA_VALID) and the
// delayed DATA_VALID carries the gap to the writers.
//
// The pixel frame is read from the frame store the preprocessing VDMA
// wrote last (PIX_FSTORES stores, lag 1), so the model is updated with the
// last complete frame. Buffer addresses and the store rotation are this
// design's choices. Port numbering in the comments follows the memory
// controller configuration of the implemented system.
module sg_pipeline #(
  parameter int unsigned H_ACTIVE    = 1280,
  parameter int unsigned V_ACTIVE    = 720,
  parameter int unsigned LATENCY     = 85,
  parameter logic [30:0] PIX_BASE    = 31'h0000_0000,
  parameter int unsigned PIX_FSTORES = 2,
  parameter logic [30:0] FSTORE_BYTES= 31'h0040_0000,
  parameter logic [30:0] MS_BASE     = 31'h0080_0000,
  parameter logic [30:0] FB_BASE     = 31'h00C0_0000,
  parameter logic [15:0] A_Q16       = 16'd65472,
  parameter logic [15:0] B_Q16       = 16'd64,
  parameter logic [15:0] K_Q8        = 16'd589,
  parameter logic [15:0] TH_Q8       = 16'd768
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync,
  // VFBC3: read pixel frame
  output logic [31:0] pix_cmd_data,
  output logic        pix_cmd_write,
  input  logic        pix_cmd_full,
  input  logic [31:0] pix_rd_data,
  input  logic        pix_rd_empty,
  output logic        pix_rd_read,
  // VFBC4: read model frame
  output logic [31:0] msr_cmd_data,
  output logic        msr_cmd_write,
  input  logic        msr_cmd_full,
  input  logic [31:0] msr_rd_data,
  input  logic        msr_rd_empty,
  output logic        msr_rd_read,
  // VFBC2: write model frame
  output logic [31:0] msw_cmd_data,
  output logic        msw_cmd_write,
  input  logic        msw_cmd_full,
  output logic [31:0] msw_wd_data,
  output logic        msw_wd_write,
  input  logic        msw_wd_full,
  // VFBC1: write classification frame
  output logic [31:0] cls_cmd_data,
  output logic        cls_cmd_write,
  input  logic        cls_cmd_full,
  output logic [31:0] cls_wd_data,
  output logic        cls_wd_write,
  input  logic        cls_wd_full,
  // status
  output logic        overflow,
  output logic        busy
);
  logic        pix_avail, msr_avail, take, pix_act, msr_act;
  logic [31:0] pix_word, msr_word;
  logic [31:0] class_out, ms_out;
  logic        vsync_d, de_d, msw_ovf, cls_ovf, msw_act, cls_act;

  vfbc_reader #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BASE_ADDR(PIX_BASE),
                .NUM_FSTORES(PIX_FSTORES), .FSTORE_BYTES(FSTORE_BYTES),
                .FSTORE_LAG(PIX_FSTORES > 1 ? 1 : 0)) u_rd_pix (
    .clk, .rst, .vsync,
    .cmd_data(pix_cmd_data), .cmd_write(pix_cmd_write), .cmd_full(pix_cmd_full),
    .rd_data(pix_rd_data), .rd_empty(pix_rd_empty), .rd_read(pix_rd_read),
    .req(take), .avail(pix_avail), .data(pix_word), .frame_active(pix_act));

  vfbc_reader #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BASE_ADDR(MS_BASE)) u_rd_ms (
    .clk, .rst, .vsync,
    .cmd_data(msr_cmd_data), .cmd_write(msr_cmd_write), .cmd_full(msr_cmd_full),
    .rd_data(msr_rd_data), .rd_empty(msr_rd_empty), .rd_read(msr_rd_read),
    .req(take), .avail(msr_avail), .data(msr_word), .frame_active(msr_act));

  // joint DATA_VALID: one pixel with its own model word
  assign take = pix_avail && msr_avail;

  sg_logic #(.A_Q16(A_Q16), .B_Q16(B_Q16), .K_Q8(K_Q8), .TH_Q8(TH_Q8), .LATENCY(LATENCY)) u_sg (
    .clk, .pixel(pix_word[23:0]), .ms_in(msr_word),
    .class_out(class_out), .ms_out(ms_out));

  delay_line #(.W(1), .N(LATENCY), .RESET(1'b1)) u_d_vs (.clk, .rst, .d(vsync), .q(vsync_d));
  delay_line #(.W(1), .N(LATENCY), .RESET(1'b1)) u_d_de (.clk, .rst, .d(take),  .q(de_d));

  vfbc_writer #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BASE_ADDR(MS_BASE)) u_wr_ms (
    .clk, .rst, .vsync(vsync_d), .de(de_d), .data(ms_out),
    .cmd_data(msw_cmd_data), .cmd_write(msw_cmd_write), .cmd_full(msw_cmd_full),
    .wd_data(msw_wd_data), .wd_write(msw_wd_write), .wd_full(msw_wd_full),
    .overflow(msw_ovf), .frame_active(msw_act));

  vfbc_writer #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .BASE_ADDR(FB_BASE)) u_wr_cls (
    .clk, .rst, .vsync(vsync_d), .de(de_d), .data(class_out),
    .cmd_data(cls_cmd_data), .cmd_write(cls_cmd_write), .cmd_full(cls_cmd_full),
    .wd_data(cls_wd_data), .wd_write(cls_wd_write), .wd_full(cls_wd_full),
    .overflow(cls_ovf), .frame_active(cls_act));

  assign overflow = msw_ovf | cls_ovf;
  assign busy     = pix_act | msr_act | msw_act | cls_act;

  // the delayed DATA_VALID must never outrun the writers' frames
  property p_no_write_outside_frame;
    @(posedge clk) disable iff (rst) de_d |-> (msw_act && cls_act);
  endproperty
  a_write_in_frame: assert property (p_no_write_outside_frame)
    else $error("sg_pipeline: model word with no frame to write it");
endmodule
