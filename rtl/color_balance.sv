// Colour correction: an individual gain for each of red, green and blue.
//
// Each 8-bit component is multiplied by its gain (Q2.7, 128 = 1.0) and
// clamped to 255. Timing: data and sync signals are delayed 1 cycle.
// The document gives the function (per-component gains); the gain format
// is this design's choice.
module color_balance #(
  parameter int unsigned GAIN_FRAC = 7
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [8:0]  gain_r, gain_g, gain_b,
  input  logic        vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [23:0] data_i,
  output logic        vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [23:0] data_o
);
  function automatic logic [7:0] scale(input logic [7:0] c, input logic [8:0] gn);
    logic [16:0] p;
    p = c * gn;
    return ((p >> GAIN_FRAC) > 17'd255) ? 8'd255 : 8'(p >> GAIN_FRAC);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      {vsync_o, hsync_o, de_o} <= '0;
      {vblank_o, hblank_o}     <= 2'b11;
      data_o <= '0;
    end else begin
      {vsync_o, hsync_o, vblank_o, hblank_o, de_o} <= {vsync_i, hsync_i, vblank_i, hblank_i, de_i};
      data_o <= {scale(data_i[23:16], gain_r), scale(data_i[15:8], gain_g), scale(data_i[7:0], gain_b)};
    end
  end
endmodule
