// Self-checking test of color_balance: random RGB pixels and gains; each
// component one cycle later must be min(255, component * gain >> 7), with
// the sync signals delayed alike.
module tb_color_balance;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [8:0] gr, gg, gb;
  logic [4:0] si, so; logic [23:0] di, dq;
  logic [28:0] e;
  color_balance dut (.clk, .rst, .gain_r(gr), .gain_g(gg), .gain_b(gb),
    .vsync_i(si[4]), .hsync_i(si[3]), .vblank_i(si[2]), .hblank_i(si[1]), .de_i(si[0]), .data_i(di),
    .vsync_o(so[4]), .hsync_o(so[3]), .vblank_o(so[2]), .hblank_o(so[1]), .de_o(so[0]), .data_o(dq));
  function automatic logic [7:0] sc(logic [7:0] c, logic [8:0] g);
    int v; v = (int'(c) * int'(g)) / 128;
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    si = 0; di = 0; gr = 128; gg = 128; gb = 128;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      if (t % 100 == 0) begin gr = 9'($urandom); gg = 9'($urandom); gb = (t == 0) ? 9'd128 : 9'($urandom); end
      si = 5'($urandom); di = 24'($urandom);
      e = {si, sc(di[23:16], gr), sc(di[15:8], gg), sc(di[7:0], gb)};
      @(posedge clk); #1;
      checks++;
      if ({so, dq} !== e) begin failures++; if (failures < 6) $display("t=%0d got %h exp %h", t, {so, dq}, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
