// Stuck (defective) pixel correction on the raw Bayer stream.
//
// An adaptive median filter with a configurable threshold: a pixel that is
// more than `thresh` above both, or below both, of its same-colour
// horizontal neighbours (two columns left and right) is replaced by the
// median of the three; any other pixel passes unchanged. A neighbour that
// lies outside the active line (its DATA_VALID is low) counts as equal to
// the pixel, so line edges are never corrected.
//
// Timing: a five-tap window; the centre tap is two cycles behind the input
// and the output is registered, so data and all sync signals are delayed 3
// cycles. One pixel per clock.
// The document names the function (adaptive median, configurable
// threshold); the one-line window is this design's simplest choice.
module stuck_pixel_corr (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] thresh,
  input  logic       vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [7:0] data_i,
  output logic       vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [7:0] data_o
);
  typedef struct packed {
    logic vs, hs, vb, hb, de;
    logic [7:0] d;
  } tap_t;
  tap_t t [5];               // t[0] = input, t[2] = centre, t[4] = x-2
  logic [7:0] c, l, r, lo, hi, med;
  logic       fix;

  assign t[0] = '{vsync_i, hsync_i, vblank_i, hblank_i, de_i, data_i};
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < 5; i++) t[i] <= '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 8'h00};
    end else begin
      for (int i = 1; i < 5; i++) t[i] <= t[i-1];
    end
  end

  always_comb begin
    c  = t[2].d;
    l  = t[4].de ? t[4].d : c;
    r  = t[0].de ? t[0].d : c;
    lo = (l < r) ? l : r;
    hi = (l < r) ? r : l;
    // median of (c, lo, hi) with lo <= hi
    med = (c < lo) ? lo : ((c > hi) ? hi : c);
    fix = (9'(c) > 9'(hi) + 9'(thresh)) || (9'(c) + 9'(thresh) < 9'(lo));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {vsync_o, hsync_o, de_o} <= '0;
      {vblank_o, hblank_o}     <= 2'b11;
      data_o                   <= '0;
    end else begin
      {vsync_o, hsync_o, vblank_o, hblank_o, de_o} <= {t[2].vs, t[2].hs, t[2].vb, t[2].hb, t[2].de};
      data_o <= (t[2].de && fix) ? med : c;
    end
  end
endmodule
