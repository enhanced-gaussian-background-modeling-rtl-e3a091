// Self-checking test of video_out: random stream; one cycle later DE must be
// DATA_VALID outside blanking, the syncs must follow, and the two 12-bit
// halves must be the low and high halves of the pixel. Also checks that the
// transmitter reset is held during reset and released after.
module tb_video_out;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [4:0] si; logic [23:0] di;
  logic de, hs, vs, rn; logic [11:0] dr, df;
  logic [26:0] e;
  video_out dut (.clk, .rst, .vsync_i(si[4]), .hsync_i(si[3]), .vblank_i(si[2]), .hblank_i(si[1]),
    .de_i(si[0]), .data_i(di), .dvi_de(de), .dvi_hsync(hs), .dvi_vsync(vs),
    .dvi_data_rise(dr), .dvi_data_fall(df), .dvi_reset_n(rn));
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    si = 0; di = 0;
    repeat (3) @(posedge clk); #1;
    checks++; if (rn !== 1'b0) begin failures++; $display("reset_n not low in reset"); end
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      si = 5'($urandom); di = 24'($urandom);
      e = {si[0] && !si[2] && !si[1], si[3], si[4], di[11:0], di[23:12]};
      @(posedge clk); #1;
      checks++;
      if ({de, hs, vs, dr, df} !== e || rn !== 1'b1) begin
        failures++; if (failures < 6) $display("t=%0d got %h exp %h", t, {de, hs, vs, dr, df}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
