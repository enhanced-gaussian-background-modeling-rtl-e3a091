// Self-checking test of image_stats: random frames with random DATA_VALID;
// at each VSYNC rising edge the reported maxima and minima must equal those
// computed in the testbench over the valid pixels of the frame just ended,
// and the video must pass with one cycle of delay.
module tb_image_stats;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic vs, de; logic [23:0] di, dq, mx, mn; logic sv;
  logic vso, hso, vbo, hbo, deo;
  logic [7:0] emx [3], emn [3];
  int pulses = 0;
  image_stats dut (.clk, .rst, .vsync_i(vs), .hsync_i(1'b0), .vblank_i(1'b0), .hblank_i(!de), .de_i(de),
    .data_i(di), .vsync_o(vso), .hsync_o(hso), .vblank_o(vbo), .hblank_o(hbo), .de_o(deo), .data_o(dq),
    .max_rgb(mx), .min_rgb(mn), .stats_valid(sv));
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [23:0] prev; logic pde;
    vs = 0; de = 0; di = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 6; f++) begin
      emx = '{default: 8'h00}; emn = '{default: 8'hFF};
      for (int t = 0; t < 500 + f * 100; t++) begin
        @(negedge clk);
        de = ($urandom_range(0, 3) != 0); di = 24'($urandom);
        // narrow the ranges so the extremes differ from frame to frame
        di = {8'(20 + $urandom_range(0, 30 * f)), 8'(200 - $urandom_range(0, 25 * f)), di[7:0] | 8'(f)};
        if (de) for (int c = 0; c < 3; c++) begin
          if (di[8*c +: 8] > emx[c]) emx[c] = di[8*c +: 8];
          if (di[8*c +: 8] < emn[c]) emn[c] = di[8*c +: 8];
        end
        prev = di; pde = de;
        @(posedge clk); #1;
        checks++; if (dq !== prev || deo !== pde) begin failures++; $display("video not passed"); end
      end
      @(negedge clk); de = 0; vs = 1;
      @(posedge clk); #1;
      checks++;
      if (!sv || mx !== {emx[2], emx[1], emx[0]} || mn !== {emn[2], emn[1], emn[0]}) begin
        failures++; $display("f%0d sv=%b max %h exp %h min %h exp %h", f, sv, mx, {emx[2], emx[1], emx[0]}, mn, {emn[2], emn[1], emn[0]});
      end
      @(negedge clk); vs = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
