// Self-checking test of pipe_sqrt: a new random operand every cycle
// (plus perfect squares and extremes); root must equal floor(sqrt(x)),
// checked as root^2 <= x < (root+1)^2, exactly 72 cycles later.
module tb_pipe_sqrt;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] x;
  logic [15:0] root;
  logic [31:0] xs [$];
  pipe_sqrt dut (.clk(clk), .x(x), .root(root));
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] xe; longint r;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      case (t % 6)
        0: x = 32'($urandom);
        1: x = 32'($urandom_range(0, 65535)) * 32'($urandom_range(0, 65535));
        2: x = 32'hFFFF_FFFF;
        3: x = 32'($urandom_range(0, 1000));
        default: x = 32'($urandom);
      endcase
      xs.push_back(x);
      if (t >= 72) begin
        xe = xs.pop_front(); r = longint'(root);
        checks++;
        if (!(r*r <= longint'(xe) && (r+1)*(r+1) > longint'(xe))) begin
          failures++; $display("x=%0d root=%0d", xe, root);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
