// Image statistics: global maximum and minimum of each colour component.
//
// While DATA_VALID is high the running maximum and minimum of R, G and B are
// updated. At the rising edge of VSYNC (the frame boundary) they are copied
// to max_rgb/min_rgb, stats_valid pulses for one cycle and the running
// values restart. The video passes through unchanged.
// Timing: video delayed 1 cycle; results change one cycle after the VSYNC
// rising edge.
// The document gives the function (global max/min per component); the
// frame boundary used for latching is this design's choice.
module image_stats (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync_i, hsync_i, vblank_i, hblank_i, de_i,
  input  logic [23:0] data_i,
  output logic        vsync_o, hsync_o, vblank_o, hblank_o, de_o,
  output logic [23:0] data_o,
  output logic [23:0] max_rgb,
  output logic [23:0] min_rgb,
  output logic        stats_valid
);
  logic [7:0] mx [3], mn [3];
  logic       vs_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      {vsync_o, hsync_o, de_o} <= '0;
      {vblank_o, hblank_o}     <= 2'b11;
      data_o      <= '0;
      vs_q        <= 1'b0;
      mx          <= '{default: 8'h00};
      mn          <= '{default: 8'hFF};
      max_rgb     <= '0;
      min_rgb     <= '0;
      stats_valid <= 1'b0;
    end else begin
      {vsync_o, hsync_o, vblank_o, hblank_o, de_o} <= {vsync_i, hsync_i, vblank_i, hblank_i, de_i};
      data_o      <= data_i;
      vs_q        <= vsync_i;
      stats_valid <= 1'b0;
      if (vsync_i && !vs_q) begin
        max_rgb     <= {mx[2], mx[1], mx[0]};
        min_rgb     <= {mn[2], mn[1], mn[0]};
        stats_valid <= 1'b1;
        mx          <= '{default: 8'h00};
        mn          <= '{default: 8'hFF};
      end else if (de_i) begin
        for (int c = 0; c < 3; c++) begin
          if (data_i[8*c +: 8] > mx[c]) mx[c] <= data_i[8*c +: 8];
          if (data_i[8*c +: 8] < mn[c]) mn[c] <= data_i[8*c +: 8];
        end
      end
    end
  end
endmodule
