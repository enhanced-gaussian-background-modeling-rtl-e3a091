// Enhanced single-Gaussian (SG) algorithm logic, one pixel per clock.
//
// For every pixel the block updates a one-Gaussian background model and
// classifies the pixel:
//   I      = gray(R,G,B)
//   mu_t   = a*mu_{t-1} + (1-a)*I
//   var_t  = a*sigma_{t-1}^2 + (1-a)*(I - mu_t)^2
//   sigma_t= sqrt(var_t)
//   fg     = |I - mu_t| > max(Th, K*sigma_t)
// The "enhanced" part is Th: the background band around the mean is never
// narrower than +-Th, which suppresses salt noise where the variance is
// small, the value is rare, or the model is still starting up.
//
// Memory holds sigma rather than the variance, so the 16 bits available per
// parameter keep more precision. ms_in/ms_out pack {mean, sigma}, both
// UFix16_8, mean in the upper half. class_out is all ones for foreground
// and zero for background.
//
// Timing (cycles after pixel and ms_in are presented) follows the
// implemented datapath: gray at 3, mu_t at 5, (I-mu_t) at 6, its square at
// 9, weighted at 10, var_t at 11, sigma_t at 83 after the 72-cycle square
// root; mean and gray are delayed to 83, |I-mu_t| at 84, the two compares
// at 85. class_out and ms_out appear LATENCY = 85 cycles after the inputs,
// one pixel per cycle with no stalls. K*sigma gets one register so that it
// meets |I-mu_t| at cycle 84; in the implemented core this alignment is not
// visible.
//
// a = 1-2^-10 and Th = 3 are the implemented constants; K is not printed
// for the implemented core and defaults to 2.3, an optimised value of the
// algorithm study. Products are truncated, var_t saturates.
module sg_logic #(
  parameter logic [15:0] A_Q16 = 16'd65472,  // a,   Q0.16
  parameter logic [15:0] B_Q16 = 16'd64,     // 1-a, Q0.16
  parameter logic [15:0] K_Q8  = 16'd589,    // K,   Q8.8
  parameter logic [15:0] TH_Q8 = 16'd768,    // Th,  UFix16_8
  parameter int unsigned LATENCY = 85        // fixed by the datapath below
) (
  input  logic        clk,
  input  logic [23:0] pixel,      // {R, G, B}
  input  logic [31:0] ms_in,      // {mu_{t-1}, sigma_{t-1}}
  output logic [31:0] class_out,
  output logic [31:0] ms_out      // {mu_t, sigma_t}
);
  import mod_pkg::*;

  // ---- gray level, valid at cycle 3
  logic [15:0] gray3;
  rgb2gray u_gray (.clk(clk), .r(pixel[23:16]), .g(pixel[15:8]), .b(pixel[7:0]), .y(gray3));

  // ---- model input register (cycle 1) and mean path
  logic [31:0] ms1;
  logic [15:0] mu2;
  logic [31:0] amu3, amu4, bi4;     // products with 16 fraction bits
  logic [15:0] mu5;
  always_ff @(posedge clk) begin
    ms1  <= ms_in;
    mu2  <= ms1[31:16];
    amu3 <= 32'((40'(mu2) * A_Q16) >> 8);     // a*mu, 16 fraction bits
    amu4 <= amu3;
    bi4  <= 32'((40'(gray3) * B_Q16) >> 8);   // (1-a)*I, 16 fraction bits
    mu5  <= 16'((33'(amu4) + 33'(bi4)) >> 8);
  end

  // ---- previous variance path: sigma^2 at 4, a*sigma^2 at 5, delayed to 10
  logic [31:0] sq2, sq3, sq4;       // UFix32_16
  logic [31:0] avar5, avar10;
  always_ff @(posedge clk) begin
    sq2   <= ms1[15:0] * ms1[15:0];
    sq3   <= sq2;
    sq4   <= sq3;
    avar5 <= 32'((64'(sq4) * A_Q16) >> 16);
  end
  delay_line #(.W(32), .N(5)) u_d_avar (.clk(clk), .rst(1'b0), .d(avar5), .q(avar10));

  // ---- innovation path: (mu_t - I) at 6, square at 9, weighted at 10
  logic [15:0] gray5;
  logic [16:0] dev6;                // two's complement 9.8
  logic [16:0] adev6;
  logic [32:0] dsq7, dsq8, dsq9;
  logic [31:0] bdsq10;
  logic [31:0] var11;
  delay_line #(.W(16), .N(2)) u_d_gray2 (.clk(clk), .rst(1'b0), .d(gray3), .q(gray5));
  always_ff @(posedge clk) begin
    dev6   <= {1'b0, mu5} - {1'b0, gray5};
    dsq7   <= adev6 * adev6;
    dsq8   <= dsq7;
    dsq9   <= dsq8;
    bdsq10 <= 32'(((dsq9 > 33'hFFFF_FFFF ? 64'hFFFF_FFFF : 64'(dsq9)) * B_Q16) >> 16);
    var11  <= ({1'b0, avar10} + {1'b0, bdsq10} > 33'hFFFF_FFFF) ? 32'hFFFF_FFFF
                                                                 : avar10 + bdsq10;
  end
  assign adev6 = dev6[16] ? -dev6 : dev6;

  // ---- standard deviation at 83
  logic [15:0] sigma83;
  pipe_sqrt #(.IN_W(32), .LATENCY(72)) u_sqrt (.clk(clk), .x(var11), .root(sigma83));

  // ---- classification: |I - mu_t| at 84, compares at 85
  logic [15:0] mu83, gray83, diff84, ksig84;
  logic        sel_k85, sel_th85;
  delay_line #(.W(16), .N(78)) u_d_mu   (.clk(clk), .rst(1'b0), .d(mu5),   .q(mu83));
  delay_line #(.W(16), .N(80)) u_d_gray (.clk(clk), .rst(1'b0), .d(gray3), .q(gray83));
  abs_diff #(.W(16)) u_abs (.clk(clk), .pixel(gray83), .mean(mu83), .diff(diff84));

  logic [31:0] ksig_full;
  assign ksig_full = sigma83 * K_Q8;   // 16.16 after the Q8.8 scaling
  always_ff @(posedge clk)
    ksig84 <= (ksig_full[31:24] != 8'd0) ? 16'hFFFF : ksig_full[23:8];

  class_cmp #(.W(16)) u_cmp_k  (.clk(clk), .difference(diff84), .bound(ksig84),
                                .class_sel(sel_k85));
  class_cmp #(.W(16)) u_cmp_th (.clk(clk), .difference(diff84), .bound(TH_Q8),
                                .class_sel(sel_th85));
  assign class_out = (sel_k85 | sel_th85) ? BG_WORD : FG_WORD;

  // ---- model output {mu_t, sigma_t} at 85
  delay_line #(.W(32), .N(2)) u_d_ms (.clk(clk), .rst(1'b0), .d({mu83, sigma83}), .q(ms_out));

  initial assert (LATENCY == 85) else $error("sg_logic: datapath latency is 85");
endmodule
