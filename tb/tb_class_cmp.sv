// Self-checking test of class_cmp: class_sel must be 1 exactly when
// difference <= bound (equality included), one cycle after the inputs.
module tb_class_cmp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] d, bnd;
  logic sel, e;
  class_cmp dut (.clk(clk), .difference(d), .bound(bnd), .class_sel(sel));
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d = 16'($urandom); bnd = (t % 5 == 0) ? d : (t % 5 == 1) ? d + 1 : (t % 5 == 2) ? d - 1 : 16'($urandom);
      e = (d <= bnd);
      @(posedge clk); #1;
      checks++; if (sel !== e) begin failures++; $display("d=%h b=%h got %b", d, bnd, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
