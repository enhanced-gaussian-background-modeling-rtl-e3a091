// Bayer-to-RGB conversion by linear interpolation.
//
// Each pixel of the 8-bit Bayer stream forms a 2x2 quad with its left
// neighbour and the two pixels above it (read from a one-line buffer). The
// quad always holds one red, one blue and two green samples: red and blue
// are taken directly and the two greens are averaged. The colour of each
// quad position follows from the column and line parity (BAYER = 0: the
// first pixel of a frame is red, RGGB). The left neighbour of the first
// pixel of a line is the last pixel of the previous line, and the line above
// the first line is the last line of the previous frame; both have the right
// colour phase when width and height are even.
//
// Timing: stage 1 registers the quad, stage 2 the RGB result, so data and
// sync signals are delayed 2 cycles. Output {R[23:16], G[15:8], B[7:0]}.
// The document gives the function (linear interpolation, 8 -> 24 bits);
// the 2x2 quad is this design's simplest form of it.
module bayer_interp #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter bit [1:0]    BAYER    = 2'd0   // 0 RGGB, 1 GRBG, 2 GBRG, 3 BGGR
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [7:0]  data_i,
  output logic        vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [23:0] data_o
);
  localparam int unsigned XW = $clog2(H_ACTIVE + 1);
  logic [7:0]    lbuf [H_ACTIVE];
  logic [XW-1:0] x;
  logic          py, in_line, vs_q;
  logic [7:0]    cur1, left1, up1, ul1;
  logic          px1, py1;
  logic [4:0]    sync1;
  logic [7:0]    r, g, b;
  logic [8:0]    gsum;
  logic          ex, ey;   // parity relative to the red sample

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; py <= 1'b0; in_line <= 1'b0; vs_q <= 1'b0;
      sync1 <= 5'b00110;
    end else begin
      vs_q  <= vsync_i;
      sync1 <= {vsync_i, hsync_i, vblank_i, hblank_i, de_i};
      if (vsync_i && !vs_q) begin
        x <= '0; py <= 1'b0; in_line <= 1'b0;
      end else if (de_i) begin
        x       <= (x == XW'(H_ACTIVE - 1)) ? '0 : x + 1'b1;
        in_line <= 1'b1;
      end else if (in_line) begin
        x       <= '0;
        py      <= !py;
        in_line <= 1'b0;
      end
    end
  end

  // the quad registers and the line buffer only move on valid pixels
  always_ff @(posedge clk) begin
    if (de_i) begin
      cur1    <= data_i;
      left1   <= cur1;
      up1     <= lbuf[x];
      ul1     <= up1;
      lbuf[x] <= data_i;
      px1     <= x[0];
      py1     <= py;
    end
  end

  always_comb begin
    ex   = px1 ^ BAYER[0];
    ey   = py1 ^ BAYER[1];
    // red sits at relative parity (0,0), blue at (1,1)
    unique case ({ey, ex})
      2'b00: begin r = cur1;  b = ul1;   end
      2'b01: begin r = left1; b = up1;   end
      2'b10: begin r = up1;   b = left1; end
      default: begin r = ul1; b = cur1;  end
    endcase
    gsum = (ex ^ ey) ? 9'(cur1) + 9'(ul1) : 9'(left1) + 9'(up1);
    g    = gsum[8:1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {vsync_o, hsync_o, de_o} <= '0;
      {vblank_o, hblank_o}     <= 2'b11;
      data_o <= '0;
    end else begin
      {vsync_o, hsync_o, vblank_o, hblank_o, de_o} <= sync1;
      data_o <= {r, g, b};
    end
  end
endmodule
