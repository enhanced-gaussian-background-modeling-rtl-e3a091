// Absolute difference |pixel - mean| of two UFix16_8 values.
//
// As in the implemented block, two registered subtractors compute
// pixel-mean and mean-pixel in parallel and the sign of pixel-mean selects
// the non-negative one. Latency 1 cycle, one result per cycle.
module abs_diff #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic [W-1:0] pixel,
  input  logic [W-1:0] mean,
  output logic [W-1:0] diff
);
  logic [W:0] pm, mp;   // one extra bit holds the sign
  always_ff @(posedge clk) begin
    pm <= {1'b0, pixel} - {1'b0, mean};
    mp <= {1'b0, mean} - {1'b0, pixel};
  end
  assign diff = pm[W] ? mp[W-1:0] : pm[W-1:0];
endmodule
