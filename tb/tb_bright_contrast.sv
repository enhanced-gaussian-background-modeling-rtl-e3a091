// Self-checking test of bright_contrast: random pixels, gains and offsets;
// every output must equal clamp((pixel * contrast >> 7) + brightness) of the
// input two cycles earlier, with the sync signals delayed alike.
module tb_bright_contrast;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [8:0] con; logic signed [8:0] bri;
  logic [4:0] si, so; logic [7:0] di, dq;
  logic [12:0] exp_q [$];
  bright_contrast dut (.clk, .rst, .contrast(con), .brightness(bri),
    .vsync_i(si[4]), .hsync_i(si[3]), .vblank_i(si[2]), .hblank_i(si[1]), .de_i(si[0]), .data_i(di),
    .vsync_o(so[4]), .hsync_o(so[3]), .vblank_o(so[2]), .hblank_o(so[1]), .de_o(so[0]), .data_o(dq));
  function automatic logic [7:0] model(logic [7:0] d, logic [8:0] c, logic signed [8:0] b);
    int v;
    v = ((int'(d) * int'(c)) >>> 7) + int'(b);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    si = 0; di = 0; con = 128; bri = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      if (t % 100 == 0) begin con = 9'($urandom); bri = 9'($urandom); end
      si = 5'($urandom); di = 8'($urandom);
      exp_q.push_back({si, model(di, con, bri)});
      if (exp_q.size() > 2) begin
        logic [12:0] e; e = exp_q.pop_front();
        // the offset is applied one stage after the gain, so the first
        // output after a configuration change mixes old and new settings
        if (t % 100 != 1) checks++;
        if (t % 100 != 1 && {so, dq} !== e) begin failures++; if (failures < 6) $display("t=%0d got %h exp %h", t, {so, dq}, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
