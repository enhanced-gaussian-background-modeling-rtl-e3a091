// RGB to gray conversion of the enhanced SG algorithm logic.
//
// I = CR*R + CG*G + CB*B with Q0.16 constant coefficients. The structure
// follows the implemented block: three registered constant multipliers,
// a registered adder for R+G while B waits one register, and a registered
// final adder, for a latency of 3 cycles and one pixel per cycle.
// The result is UFix16_8 (8 integer, 8 fraction bits), the format of the
// mean it is compared with.
// Default coefficients are those of the implemented block (0.2126, 0.7152,
// 0.0722); the algorithm text gives 0.2989/0.5870/0.1140, which can be set
// through the parameters (19589, 38470, 7471). CG is rounded so that the
// three defaults sum to exactly 1.0, so white maps to 255.0.
module rgb2gray #(
  parameter logic [15:0] CR = 16'd13933,
  parameter logic [15:0] CG = 16'd46871,
  parameter logic [15:0] CB = 16'd4732
) (
  input  logic        clk,
  input  logic [7:0]  r,
  input  logic [7:0]  g,
  input  logic [7:0]  b,
  output logic [15:0] y   // UFix16_8
);
  logic [23:0] pr, pg, pb;      // stage 1: products, 8.16
  logic [24:0] s_rg;            // stage 2
  logic [23:0] pb_d;
  logic [25:0] s_all;           // stage 3

  always_ff @(posedge clk) begin
    pr    <= r * CR;
    pg    <= g * CG;
    pb    <= b * CB;
    s_rg  <= pr + pg;
    pb_d  <= pb;
    s_all <= s_rg + 26'(pb_d);
  end

  // 8.16 -> 8.8, truncated; saturate in case custom coefficients exceed 1.0
  assign y = (s_all[25:24] != 2'd0) ? 16'hFFFF : s_all[23:8];
endmodule
