// Self-checking test of vfbc_writer with two frame stores against the
// behavioural memory controller. Writer A (write FIFO never full) stores
// four frames of randomly spaced words; each frame must land in the next
// store (0, 1, 0, 1), in order, and the command packet must carry the size,
// write flag and address. Writer B sees a write FIFO that is full at random
// and must flag overflow; writer A must not.
module tb_vfbc_writer;
  localparam int H = 8, V = 4, N = H * V;
  localparam logic [30:0] BASE = 31'h0020_0000, FS = 31'h0000_1000;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, vsync = 0, de = 0;
  logic [31:0] data;
  int checks = 0, failures = 0;
  logic        clk_a [1], cmd_write [1], cmd_full [1], wd_write [1], wd_full [1], rd_empty [1], rd_read [1];
  logic [31:0] cmd_data [1], wd_data [1], rd_data [1];
  logic        cmd_write_b [1], cmd_full_b [1], wd_write_b [1], wd_full_b [1], rd_empty_b [1], rd_read_b [1];
  logic [31:0] cmd_data_b [1], wd_data_b [1], rd_data_b [1];
  logic ovf_a, ovf_b, act_a, act_b;
  logic [31:0] pkt [$];
  logic [31:0] sent [N];
  assign clk_a[0] = clk; assign rd_read[0] = 0; assign rd_read_b[0] = 0;
  vfbc_mem_model #(.NP(1)) mem_a (.rst, .clk(clk_a), .cmd_data, .cmd_write, .cmd_full, .wd_data, .wd_write,
    .wd_full, .rd_data, .rd_empty, .rd_read);
  vfbc_mem_model #(.NP(1), .FULL_PCT(20)) mem_b (.rst, .clk(clk_a), .cmd_data(cmd_data_b), .cmd_write(cmd_write_b),
    .cmd_full(cmd_full_b), .wd_data(wd_data_b), .wd_write(wd_write_b), .wd_full(wd_full_b), .rd_data(rd_data_b),
    .rd_empty(rd_empty_b), .rd_read(rd_read_b));
  vfbc_writer #(.H_ACTIVE(H), .V_ACTIVE(V), .BASE_ADDR(BASE), .NUM_FSTORES(2), .FSTORE_BYTES(FS)) dut (
    .clk, .rst, .vsync, .de, .data, .cmd_data(cmd_data[0]), .cmd_write(cmd_write[0]), .cmd_full(cmd_full[0]),
    .wd_data(wd_data[0]), .wd_write(wd_write[0]), .wd_full(wd_full[0]), .overflow(ovf_a), .frame_active(act_a));
  vfbc_writer #(.H_ACTIVE(H), .V_ACTIVE(V), .BASE_ADDR(BASE), .NUM_FSTORES(2), .FSTORE_BYTES(FS)) dut_b (
    .clk, .rst, .vsync, .de, .data, .cmd_data(cmd_data_b[0]), .cmd_write(cmd_write_b[0]), .cmd_full(cmd_full_b[0]),
    .wd_data(wd_data_b[0]), .wd_write(wd_write_b[0]), .wd_full(wd_full_b[0]), .overflow(ovf_b), .frame_active(act_b));
  always @(posedge clk) if (cmd_write[0]) pkt.push_back(cmd_data[0]);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 4; f++) begin
      int st, bw;
      st = f % 2; bw = int'(BASE + (st != 0 ? FS : 31'h0)) / 4;
      @(negedge clk) vsync = 1;
      @(negedge clk) vsync = 0;
      repeat (6) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        de = 1; data = $urandom; sent[i] = data;
        @(negedge clk);
        de = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat (4) @(negedge clk);
      checks++;
      if (act_a) begin failures++; $display("writer still active"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (mem_a.peek(bw + i) !== sent[i]) begin
          failures++; if (failures < 6) $display("f%0d w%0d got %h exp %h", f, i, mem_a.peek(bw + i), sent[i]);
        end
      end
      checks++;
      if (pkt.size() != 4 || pkt[0] != H * 4 || pkt[1] != {1'b1, BASE + (st != 0 ? FS : 31'h0)} ||
          pkt[2] != V - 1 || pkt[3] != H * 4) begin
        failures++; $display("f%0d command packet wrong (%0d words)", f, pkt.size());
      end
      pkt.delete();
    end
    checks += 2;
    if (ovf_a) begin failures++; $display("overflow without a full FIFO"); end
    if (!ovf_b) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
