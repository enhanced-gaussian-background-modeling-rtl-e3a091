// Self-checking test of display_pipeline at a small raster: a
// classification frame is preloaded in the behavioural memory; over three
// displayed frames every DVI pixel, rebuilt from its two 12-bit halves,
// must equal the stored word in raster order, each frame must show exactly
// the active pixel count, and the reader must never underflow.
module tb_display_pipeline;
  localparam int HA = 8, VA = 4, N = HA * VA;
  localparam logic [30:0] FB = 31'h00C0_0000;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1;
  int checks = 0, failures = 0, idx = 0, frames = 0;
  logic        clk_a [1], cmd_write [1], cmd_full [1], wd_write [1], wd_full [1], rd_empty [1], rd_read [1];
  logic [31:0] cmd_data [1], wd_data [1], rd_data [1];
  logic de, hs, vs, rn, vs_q; logic [11:0] dr, df; logic [31:0] uf;
  assign clk_a[0] = clk; assign wd_data[0] = 0; assign wd_write[0] = 0;
  vfbc_mem_model #(.NP(1), .RD_DEPTH(16)) mem_m (.rst, .clk(clk_a), .cmd_data, .cmd_write, .cmd_full,
    .wd_data, .wd_write, .wd_full, .rd_data, .rd_empty, .rd_read);
  display_pipeline #(.H_ACTIVE(HA), .H_FP(2), .H_SYNC(2), .H_BP(4), .V_ACTIVE(VA), .V_FP(1), .V_SYNC(1), .V_BP(3),
                     .FB_BASE(FB)) dut (
    .clk, .rst, .cmd_data(cmd_data[0]), .cmd_write(cmd_write[0]), .cmd_full(cmd_full[0]),
    .rd_data(rd_data[0]), .rd_empty(rd_empty[0]), .rd_read(rd_read[0]),
    .dvi_de(de), .dvi_hsync(hs), .dvi_vsync(vs), .dvi_data_rise(dr), .dvi_data_fall(df), .dvi_reset_n(rn),
    .underflows(uf));
  always @(posedge clk) if (!rst) begin
    vs_q <= vs;
    if (vs && !vs_q) begin
      if (idx != 0) begin
        checks++; frames++;
        if (idx != N) begin failures++; $display("frame showed %0d pixels", idx); end
      end
      idx = 0;
    end
    if (de) begin
      logic [31:0] e; e = mem_m.peek(int'(FB) / 4 + (idx % N));
      checks++;
      if ({df, dr} !== e[23:0]) begin failures++; if (failures < 6) $display("px%0d got %h exp %h", idx, {df, dr}, e[23:0]); end
      idx++;
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < N; i++) mem_m.mem[int'(FB) / 4 + i] = ($urandom_range(0, 1) != 0) ? 32'hFFFF_FFFF : 32'h0;
    vs_q = 0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (frames == 3);
    checks++; if (uf != 0) begin failures++; $display("underflows %0d", uf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
