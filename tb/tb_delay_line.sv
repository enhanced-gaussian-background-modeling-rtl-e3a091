// Self-checking test of delay_line: a random stream must reappear exactly
// N cycles later, for the default N = 85 and for N = 0 (wire) and N = 2.
module tb_delay_line;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] d, q85, q2, q0;
  logic [7:0] hist [0:255];
  delay_line #(.W(8))          dut   (.clk(clk), .rst(1'b0), .d(d), .q(q85));
  delay_line #(.W(8), .N(2))   dut2  (.clk(clk), .rst(1'b0), .d(d), .q(q2));
  delay_line #(.W(8), .N(0))   dut0  (.clk(clk), .rst(1'b0), .d(d), .q(q0));
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    d = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t >= 90) begin
        checks++; if (q85 !== hist[(t-85) & 255]) begin failures++; $display("t=%0d q85=%h exp=%h", t, q85, hist[(t-85)&255]); end
        checks++; if (q2  !== hist[(t-2) & 255]) failures++;
      end
      d = 8'($urandom); hist[t & 255] = d;
      #1; checks++; if (q0 !== d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
