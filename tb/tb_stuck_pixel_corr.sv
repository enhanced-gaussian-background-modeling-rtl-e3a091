// Self-checking test of stuck_pixel_corr: lines of random pixels with
// inserted hot and dead pixels, separated by blanking. The expected output
// is worked out per pixel from its same-colour neighbours two columns away:
// a pixel beyond the threshold above or below both becomes the median of
// the three. Output latency 3 cycles.
module tb_stuck_pixel_corr;
  localparam int NC = 3000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, fixed = 0;
  logic [7:0] th;
  logic vs, de; logic [7:0] di, dq;
  logic vso, hso, vbo, hbo, deo;
  logic       cde [NC];
  logic [7:0] cd  [NC];
  stuck_pixel_corr dut (.clk, .rst, .thresh(th), .vsync_i(vs), .hsync_i(1'b0), .vblank_i(1'b0),
    .hblank_i(!de), .de_i(de), .data_i(di), .vsync_o(vso), .hsync_o(hso), .vblank_o(vbo), .hblank_o(hbo),
    .de_o(deo), .data_o(dq));
  function automatic logic [7:0] expect_at(int i);
    int c, l, r, lo, hi;
    c = cd[i];
    l = (i >= 2 && cde[i-2]) ? cd[i-2] : c;
    r = (i + 2 < NC && cde[i+2]) ? cd[i+2] : c;
    lo = (l < r) ? l : r; hi = (l < r) ? r : l;
    if (c > hi + th) return 8'(hi);
    if (c + th < lo) return 8'(lo);
    return 8'(c);
  endfunction
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int i;
    th = 8'd30;
    // build the cycle-by-cycle input: lines of 8..40 pixels, 3 blank cycles
    i = 0;
    while (i < NC) begin
      int w; w = $urandom_range(8, 40);
      for (int x = 0; x < w && i < NC; x++) begin
        cde[i] = 1; cd[i] = 8'($urandom_range(90, 140));
        if ($urandom_range(0, 9) == 0) cd[i] = ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
        i++;
      end
      for (int b = 0; b < 3 && i < NC; b++) begin cde[i] = 0; cd[i] = 8'($urandom); i++; end
    end
    vs = 0; de = 0; di = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NC + 2; t++) begin
      if (t < NC) begin de = cde[t]; di = cd[t]; end else begin de = 0; di = 0; end
      @(posedge clk); #1;
      if (t >= 2 && cde[t-2]) begin
        logic [7:0] e; e = expect_at(t - 2);
        checks++;
        if (e != cd[t-2]) fixed++;
        if (dq !== e || !deo) begin failures++; if (failures < 6) $display("i=%0d got %0d exp %0d", t - 2, dq, e); end
      end
      @(negedge clk);
    end
    checks++; if (fixed < 50) begin failures++; $display("only %0d corrected pixels", fixed); end
    $display("corrected %0d", fixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
