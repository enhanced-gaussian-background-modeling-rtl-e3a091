// Self-checking test of video_detect: frames of random size with blanking
// between lines and frames; checks one fsync per VSYNC rising edge, and
// after each frame that h_res and v_res report the frame's size.
module tb_video_detect;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fs = 0;
  logic vs, de; logic [23:0] di, dq;
  logic vso, hso, vbo, hbo, deo, fsync, rv; logic [11:0] hr, vr;
  video_detect dut (.clk, .rst, .vsync_i(vs), .hsync_i(1'b0), .vblank_i(1'b0), .hblank_i(!de), .de_i(de),
    .data_i(di), .vsync_o(vso), .hsync_o(hso), .vblank_o(vbo), .hblank_o(hbo), .de_o(deo), .data_o(dq),
    .fsync, .h_res(hr), .v_res(vr), .res_valid(rv));
  always @(posedge clk) if (fsync) fs++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int w, h, pw, ph;
    vs = 0; de = 0; di = 0; pw = 0; ph = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 6; f++) begin
      w = $urandom_range(4, 40); h = $urandom_range(2, 20);
      @(negedge clk) vs = 1;
      repeat (3) @(negedge clk);
      vs = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (fs != f + 1) begin failures++; $display("fsync count %0d exp %0d", fs, f + 1); end
      if (f > 0) begin
        checks++;
        if (!rv || hr != 12'(pw) || vr != 12'(ph)) begin failures++; $display("f%0d res %0dx%0d exp %0dx%0d", f, hr, vr, pw, ph); end
      end
      for (int y = 0; y < h; y++) begin
        for (int x = 0; x < w; x++) begin de = 1; di = 24'($urandom); @(negedge clk); end
        de = 0; repeat (5) @(negedge clk);
      end
      pw = w; ph = h;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
