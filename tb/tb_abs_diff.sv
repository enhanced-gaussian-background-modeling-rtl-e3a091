// Self-checking test of abs_diff: random and equal operands, result one
// cycle later must be |pixel - mean|.
module tb_abs_diff;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] p, m, dif, e;
  abs_diff dut (.clk(clk), .pixel(p), .mean(m), .diff(dif));
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      p = 16'($urandom); m = (t % 7 == 0) ? p : 16'($urandom);
      e = (p > m) ? p - m : m - p;
      @(posedge clk); #1;
      checks++; if (dif !== e) begin failures++; $display("p=%h m=%h got %h exp %h", p, m, dif, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
