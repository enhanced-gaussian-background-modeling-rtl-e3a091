// Classification compare: is the difference within the bound?
//
// A registered subtractor forms difference - bound and the sign of the
// result is the decision. class_sel is 1 when difference <= bound, i.e.
// the pixel lies inside this bound and counts as background for it.
// Two of these, one against K*sigma and one against Th, are ORed by the
// algorithm logic. Equality counts as background, as the algorithm's
// "<=" states. Latency 1 cycle.
module class_cmp #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic [W-1:0] difference,
  input  logic [W-1:0] bound,
  output logic         class_sel
);
  logic [W:0] d;
  always_ff @(posedge clk) d <= {1'b0, bound} - {1'b0, difference};
  assign class_sel = ~d[W];   // bound - difference >= 0
endmodule
