// Gamma correction through one 256-entry look-up table per colour channel.
//
// After reset an initialisation sequence writes the identity curve into all
// three tables (256 cycles, then init_done); a host can then load any curve
// through the write port (lut_sel 0 = red, 1 = green, 2 = blue). Each
// component of the stream addresses its own table.
// Timing: video delayed 1 cycle; a table write takes effect on the next
// cycle. While init_done is low the output follows the tables as they fill.
// The document gives the function (gamma by look-up table); the table
// contents and the loading scheme are this design's choices.
module gamma_lut (
  input  logic        clk,
  input  logic        rst,
  input  logic        lut_we,
  input  logic [1:0]  lut_sel,
  input  logic [7:0]  lut_addr,
  input  logic [7:0]  lut_wdata,
  output logic        init_done,
  input  logic        vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [23:0] data_i,
  output logic        vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [23:0] data_o
);
  logic [7:0] lut_r [256], lut_g [256], lut_b [256];
  logic [7:0] init_a;
  logic       we;
  logic [1:0] wsel;
  logic [7:0] wa, wd;

  always_comb begin
    we   = !init_done || lut_we;
    wsel = init_done ? lut_sel : 2'd3;   // 3 = all three during init
    wa   = init_done ? lut_addr : init_a;
    wd   = init_done ? lut_wdata : init_a;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      init_a    <= '0;
      init_done <= 1'b0;
    end else if (!init_done) begin
      init_a <= init_a + 1'b1;
      if (init_a == 8'hFF) init_done <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we && (wsel == 2'd0 || wsel == 2'd3)) lut_r[wa] <= wd;
    if (we && (wsel == 2'd1 || wsel == 2'd3)) lut_g[wa] <= wd;
    if (we && (wsel == 2'd2 || wsel == 2'd3)) lut_b[wa] <= wd;
    data_o <= {lut_r[data_i[23:16]], lut_g[data_i[15:8]], lut_b[data_i[7:0]]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {vsync_o, hsync_o, de_o} <= '0;
      {vblank_o, hblank_o}     <= 2'b11;
    end else begin
      {vsync_o, hsync_o, vblank_o, hblank_o, de_o} <= {vsync_i, hsync_i, vblank_i, hblank_i, de_i};
    end
  end
endmodule
