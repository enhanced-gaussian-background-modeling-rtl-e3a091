// Self-checking test of rgb2gray: random and corner colours, compared with
// a real-valued weighted sum (tolerance 1/256 plus coefficient rounding),
// exact value for white, and the 3-cycle latency.
module tb_rgb2gray;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] r, g, b;
  logic [15:0] y;
  rgb2gray dut (.clk(clk), .r(r), .g(g), .b(b), .y(y));
  real expq [$];
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real e, got;
    for (int t = 0; t < 300; t++) begin
      if (t == 0) begin r = 255; g = 255; b = 255; end
      else if (t == 1) begin r = 255; g = 0; b = 0; end
      else begin r = 8'($urandom); g = 8'($urandom); b = 8'($urandom); end
      expq.push_back(0.2126*r + 0.7152*g + 0.0722*b);
      @(posedge clk); #1;
      if (t >= 2) begin
        e = expq.pop_front(); got = real'(y) / 256.0;
        checks++;
        if (got > e + 0.02 || got < e - 0.02) begin failures++; $display("t=%0d got %f exp %f", t, got, e); end
        if (t == 2) begin checks++; if (y !== 16'hFF00) begin failures++; $display("white -> %h", y); end end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
