// Video output to the DVI transmitter (TFP410) in its 12-bit dual-edge mode.
//
// The XVSI stream is re-registered into the transmitter's DE, HSYNC and
// VSYNC pins, and each 24-bit pixel is split into the two 12-bit halves
// that the transmitter takes on the rising and the falling clock edge:
// rise = {G[3:0], B[7:0]}, fall = {R[7:0], G[7:4]}. The transmitter reset is
// the inverted system reset, registered. SYNC_ACTIVE_LOW inverts both syncs.
// The dual-edge output register itself is a device primitive and is not
// part of this module: both halves leave as ports.
// Timing: 1 cycle.
// The document gives the 12-bit bus and the signal names; the half order is
// taken from the transmitter's 12-bit mode, the rest is this design's.
module video_out #(
  parameter bit SYNC_ACTIVE_LOW = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [23:0] data_i,
  output logic        dvi_de,
  output logic        dvi_hsync,
  output logic        dvi_vsync,
  output logic [11:0] dvi_data_rise,
  output logic [11:0] dvi_data_fall,
  output logic        dvi_reset_n
);
  always_ff @(posedge clk) begin
    if (rst) begin
      dvi_de        <= 1'b0;
      dvi_hsync     <= SYNC_ACTIVE_LOW;
      dvi_vsync     <= SYNC_ACTIVE_LOW;
      dvi_data_rise <= '0;
      dvi_data_fall <= '0;
      dvi_reset_n   <= 1'b0;
    end else begin
      // the blanking flags are implied by DE at the transmitter
      dvi_de        <= de_i && !(vblank_i || hblank_i);
      dvi_hsync     <= hsync_i ^ SYNC_ACTIVE_LOW;
      dvi_vsync     <= vsync_i ^ SYNC_ACTIVE_LOW;
      dvi_data_rise <= data_i[11:0];
      dvi_data_fall <= data_i[23:12];
      dvi_reset_n   <= 1'b1;
    end
  end
endmodule
