// Self-checking test of sg_pipeline on a 16x8 frame with a behavioural
// memory controller whose read FIFOs fill at random (stalls).
// Two pixel frame stores are preloaded with different images and the model
// buffer with random {mean, sigma}. Three frames are run; after each the
// classification buffer must equal the reference model applied to the
// pixel frame the pipeline should have read (the store written before),
// and at the end the model buffer must hold the reference model after
// three updates. Also checked: stalls happened, the first model word is
// written exactly 85 cycles after its pixel was taken, no overflow.
module tb_sg_pipeline;
  import sg_ref_pkg::*;
  localparam int H = 16, V = 8, N = H * V;
  localparam int PIX0 = 32'h0000_0000 / 4, PIX1 = 32'h0040_0000 / 4;
  localparam int MSB = 32'h0080_0000 / 4, FBB = 32'h00C0_0000 / 4;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, vsync = 0;
  int checks = 0, failures = 0, stalls = 0, frames = 0;

  logic        clk_a    [4];
  logic [31:0] cmd_data [4];
  logic        cmd_write[4];
  logic        cmd_full [4];
  logic [31:0] wd_data  [4];
  logic        wd_write [4];
  logic        wd_full  [4];
  logic [31:0] rd_data  [4];
  logic        rd_empty [4];
  logic        rd_read  [4];
  logic overflow, busy;
  // port 0: read pixel, 1: read model, 2: write model, 3: write class
  assign clk_a = '{clk, clk, clk, clk};
  assign wd_data[0] = 0; assign wd_write[0] = 0; assign wd_data[1] = 0; assign wd_write[1] = 0;
  assign rd_read[2] = 0; assign rd_read[3] = 0;

  vfbc_mem_model #(.NP(4), .RD_DEPTH(8), .STALL_PCT(25)) mem_m (.rst,
    .clk(clk_a), .cmd_data, .cmd_write, .cmd_full, .wd_data, .wd_write, .wd_full,
    .rd_data, .rd_empty, .rd_read);

  sg_pipeline #(.H_ACTIVE(H), .V_ACTIVE(V)) dut (
    .clk, .rst, .vsync,
    .pix_cmd_data(cmd_data[0]), .pix_cmd_write(cmd_write[0]), .pix_cmd_full(cmd_full[0]),
    .pix_rd_data(rd_data[0]), .pix_rd_empty(rd_empty[0]), .pix_rd_read(rd_read[0]),
    .msr_cmd_data(cmd_data[1]), .msr_cmd_write(cmd_write[1]), .msr_cmd_full(cmd_full[1]),
    .msr_rd_data(rd_data[1]), .msr_rd_empty(rd_empty[1]), .msr_rd_read(rd_read[1]),
    .msw_cmd_data(cmd_data[2]), .msw_cmd_write(cmd_write[2]), .msw_cmd_full(cmd_full[2]),
    .msw_wd_data(wd_data[2]), .msw_wd_write(wd_write[2]), .msw_wd_full(wd_full[2]),
    .cls_cmd_data(cmd_data[3]), .cls_cmd_write(cmd_write[3]), .cls_cmd_full(cmd_full[3]),
    .cls_wd_data(wd_data[3]), .cls_wd_write(wd_write[3]), .cls_wd_full(wd_full[3]),
    .overflow, .busy);

  logic [31:0] model [N];
  logic [23:0] img0 [N], img1 [N];
  int take_t [$], lat_first = -1, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (dut.busy && dut.u_rd_pix.state == 2 && !dut.take) stalls++;
    if (dut.take && !rst) take_t.push_back(cyc);
    if (wd_write[2] && take_t.size() != 0) begin
      int t0;
      t0 = take_t.pop_front();
      if (lat_first < 0) lat_first = cyc - t0;
      else if (cyc - t0 != lat_first) begin failures++; $display("latency changed %0d", cyc - t0); end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog rp %0d/%0d rm %0d/%0d wm %0d/%0d wc %0d/%0d ovf %b", dut.u_rd_pix.state, dut.u_rd_pix.cnt, dut.u_rd_ms.state, dut.u_rd_ms.cnt, dut.u_wr_ms.state, dut.u_wr_ms.cnt, dut.u_wr_cls.state, dut.u_wr_cls.cnt, overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sg_res_t r;
    for (int i = 0; i < N; i++) begin
      img0[i] = 24'($urandom); img1[i] = (i % 3 == 0) ? 24'($urandom) : img0[i];
      mem_m.mem[PIX0 + i] = {8'h0, img0[i]};
      mem_m.mem[PIX1 + i] = {8'h0, img1[i]};
      model[i] = {8'($urandom), 8'($urandom), 16'($urandom_range(0, 1500))};
      mem_m.mem[MSB + i] = model[i];
    end
    repeat (5) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 3; f++) begin
      @(posedge clk); vsync <= 1; @(posedge clk); vsync <= 0;
      repeat (10) @(posedge clk);
      while (busy) @(posedge clk);
      repeat (5) @(posedge clk);
      // frame f reads store (f-1) mod 2: f=0 -> 1, f=1 -> 0, f=2 -> 1
      for (int i = 0; i < N; i++) begin
        r = sg_step((f % 2 == 0) ? img1[i] : img0[i], model[i]);
        model[i] = r.ms;
        checks++;
        if (mem_m.peek(FBB + i) !== r.cls) begin
          failures++; if (failures < 8) $display("f%0d px%0d class %h exp %h", f, i, mem_m.peek(FBB + i), r.cls);
        end
      end
      frames++;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (mem_m.peek(MSB + i) !== model[i]) begin
        failures++; if (failures < 8) $display("px%0d model %h exp %h", i, mem_m.peek(MSB + i), model[i]);
      end
    end
    checks++; if (lat_first != 85) begin failures++; $display("latency %0d", lat_first); end
    checks++; if (stalls == 0) begin failures++; $display("no stall seen"); end
    checks++; if (overflow) begin failures++; $display("overflow"); end
    $display("cmds %0d %0d %0d %0d", mem_m.cmd_seen[0], mem_m.cmd_seen[1], mem_m.cmd_seen[2], mem_m.cmd_seen[3]);
    $display("frames=%0d stalls=%0d latency=%0d", frames, stalls, lat_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
