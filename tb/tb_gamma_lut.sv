// Self-checking test of gamma_lut: waits for the identity tables, checks
// that the stream passes unchanged, loads an inverting curve into red and a
// squaring curve into blue through the write port, and checks every output
// one cycle after its input against those curves.
module tb_gamma_lut;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we; logic [1:0] sel; logic [7:0] a, wdat; logic done;
  logic [4:0] si, so; logic [23:0] di, dq;
  logic [28:0] e;
  gamma_lut dut (.clk, .rst, .lut_we(we), .lut_sel(sel), .lut_addr(a), .lut_wdata(wdat), .init_done(done),
    .vsync_i(si[4]), .hsync_i(si[3]), .vblank_i(si[2]), .hblank_i(si[1]), .de_i(si[0]), .data_i(di),
    .vsync_o(so[4]), .hsync_o(so[3]), .vblank_o(so[2]), .hblank_o(so[1]), .de_o(so[0]), .data_o(dq));
  function automatic logic [7:0] sq(logic [7:0] x);
    return 8'((int'(x) * int'(x)) / 255);
  endfunction
  task automatic run(int n, bit curves);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      si = 5'($urandom); di = 24'($urandom);
      e = curves ? {si, ~di[23:16], di[15:8], sq(di[7:0])} : {si, di};
      @(posedge clk); #1;
      checks++;
      if ({so, dq} !== e) begin failures++; if (failures < 6) $display("got %h exp %h", {so, dq}, e); end
    end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    si = 0; di = 0; we = 0; sel = 0; a = 0; wdat = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (255) @(posedge clk); #1;
    checks++; if (done) begin failures++; $display("init finished early"); end
    @(posedge clk); #1;
    checks++; if (!done) begin failures++; $display("init not finished after 256 cycles"); end
    run(300, 0);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; sel = 0; a = 8'(i); wdat = ~8'(i);
      @(negedge clk); sel = 2; wdat = sq(8'(i));
    end
    @(negedge clk); we = 0;
    run(1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
