// Brightness and contrast adjustment of the raw 8-bit stream.
//
// Contrast is a global digital gain (a multiplier, gain in Q2.7 so that
// 128 = 1.0) and brightness a global signed offset (an adder); the result
// is clamped to 0..255. Stage 1 multiplies, stage 2 adds and clamps.
//
// Timing: data and sync signals are delayed 2 cycles; one pixel per clock.
// The document gives the multiplier-and-adder structure; the gain format
// and the order gain-then-offset are this design's choices.
module bright_contrast #(
  parameter int unsigned GAIN_FRAC = 7
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [8:0] contrast,    // unsigned, 1.0 = 1 << GAIN_FRAC
  input  logic signed [8:0] brightness,
  input  logic       vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [7:0] data_i,
  output logic       vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [7:0] data_o
);
  logic [16:0] prod;
  logic [4:0]  sync1;
  logic signed [11:0] sum;

  // prod >> GAIN_FRAC is at most 1018, so 12 signed bits hold the sum
  always_comb sum = signed'(12'(prod >> GAIN_FRAC)) + 12'(brightness);

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= 5'b00110;
      {vsync_o, hsync_o, de_o} <= '0;
      {vblank_o, hblank_o}     <= 2'b11;
      prod   <= '0;
      data_o <= '0;
    end else begin
      prod  <= data_i * contrast;
      sync1 <= {vsync_i, hsync_i, vblank_i, hblank_i, de_i};
      {vsync_o, hsync_o, vblank_o, hblank_o, de_o} <= sync1;
      data_o <= (sum < 0) ? 8'd0 : (sum > 12'sd255) ? 8'd255 : sum[7:0];
    end
  end
endmodule
