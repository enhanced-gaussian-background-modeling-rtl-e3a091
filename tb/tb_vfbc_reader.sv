// Self-checking test of vfbc_reader with two frame stores and a lag of one
// store, against the behavioural memory controller with random read-FIFO
// stalls. Two stores are preloaded with different data; five frames are
// read with a randomly pausing consumer. Checks: every frame delivers
// exactly the words of the store it should read (frame n reads store n-1),
// in order; a VSYNC held for two cycles starts only one frame; the
// command packet carries the size, direction and address; stalls happened.
module tb_vfbc_reader;
  localparam int H = 8, V = 4, N = H * V;
  localparam logic [30:0] BASE = 31'h0010_0000, FS = 31'h0000_1000;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst = 1, vsync = 0;
  int checks = 0, failures = 0, stalls = 0;
  logic        clk_a [1], cmd_write [1], cmd_full [1], wd_write [1], wd_full [1], rd_empty [1], rd_read [1];
  logic [31:0] cmd_data [1], wd_data [1], rd_data [1];
  logic req, avail, act; logic [31:0] data;
  logic [31:0] pkt [$];
  assign clk_a[0] = clk; assign wd_data[0] = 0; assign wd_write[0] = 0;
  vfbc_mem_model #(.NP(1), .RD_DEPTH(4), .STALL_PCT(30)) mem_m (.rst, .clk(clk_a), .cmd_data, .cmd_write,
    .cmd_full, .wd_data, .wd_write, .wd_full, .rd_data, .rd_empty, .rd_read);
  vfbc_reader #(.H_ACTIVE(H), .V_ACTIVE(V), .BASE_ADDR(BASE), .NUM_FSTORES(2), .FSTORE_BYTES(FS), .FSTORE_LAG(1))
    dut (.clk, .rst, .vsync, .cmd_data(cmd_data[0]), .cmd_write(cmd_write[0]), .cmd_full(cmd_full[0]),
         .rd_data(rd_data[0]), .rd_empty(rd_empty[0]), .rd_read(rd_read[0]), .req, .avail, .data, .frame_active(act));
  always @(posedge clk) begin
    if (cmd_write[0]) pkt.push_back(cmd_data[0]);
    if (act && dut.state == 2 && !avail) stalls++;
  end
  always @(negedge clk) req <= ($urandom_range(0, 3) != 0);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int base_w [2];
    base_w[0] = int'(BASE) / 4; base_w[1] = int'(BASE + FS) / 4;
    for (int s = 0; s < 2; s++) for (int i = 0; i < N; i++) mem_m.mem[base_w[s] + i] = {8'(s), 24'($urandom)};
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 5; f++) begin
      int got, st;
      st = (f + 1) % 2;   // store n-1
      @(negedge clk) vsync = 1;
      @(negedge clk);
      if (f == 2) @(negedge clk);   // a two-cycle VSYNC
      vsync = 0;
      got = 0;
      while (got < N) begin
        @(posedge clk);
        if (req && avail) begin
          checks++;
          if (data !== mem_m.peek(base_w[st] + got)) begin
            failures++; if (failures < 6) $display("f%0d w%0d got %h exp %h", f, got, data, mem_m.peek(base_w[st] + got));
          end
          got++;
        end
      end
      repeat (3) @(posedge clk);
      checks++;
      if (act) begin failures++; $display("reader still active after %0d words", N); end
      checks++;
      if (pkt.size() != 4 || pkt[0] != H * 4 || pkt[1] != {1'b0, BASE + (st != 0 ? FS : 31'h0)} ||
          pkt[2] != V - 1 || pkt[3] != H * 4) begin
        failures++; $display("f%0d command packet wrong (%0d words)", f, pkt.size());
      end
      pkt.delete();
    end
    checks++; if (stalls == 0) begin failures++; $display("no stalls"); end
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
