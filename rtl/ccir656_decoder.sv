// CCIR656 decoder: turns the camera's 8-bit CCIR656 byte stream into the
// XVSI video stream (VSYNC, HSYNC, VBLANK, HBLANK, DATA_VALID, VIDEO_DATA).
//
// The camera marks the start and end of active video with four-byte timing
// codes FF 00 00 XY (SAV before, EAV after the active pixels). A four-byte
// history register finds the code when its oldest three bytes read FF 00 00;
// the fourth byte XY carries the V (bit 5) and H (bit 4) flags, which set
// VBLANK and HBLANK for the bytes after the code. The four code bytes are
// always output as blank. DATA_VALID = NOT(VBLANK OR HBLANK), as printed in
// the decoder's block figure. VSYNC and HSYNC from the camera are passed
// through with the same delay.
//
// Timing: every output is the input of five clock cycles earlier (four bytes
// of history plus the output register); one byte per clock.
// The document gives the function and the DATA_VALID equation; the bit
// positions of V and H are those of the CCIR656 standard, and the reset
// state (blanking on) is this design's choice.
module ccir656_decoder (
  input  logic       clk,
  input  logic       rst,
  input  logic       cam_vsync,
  input  logic       cam_hsync,
  input  logic [7:0] cam_data,
  output logic       vsync_o,
  output logic       hsync_o,
  output logic       vblank_o,
  output logic       hblank_o,
  output logic       de_o,
  output logic [7:0] data_o
);
  logic [7:0] sh [4];        // sh[0] newest byte
  logic [3:0] vs_sh, hs_sh;
  logic       h_st, v_st;    // blanking state from the last timing code
  logic [1:0] code_cnt;      // code bytes still to leave the history
  logic       det, blank_now;

  assign det       = (sh[3] == 8'hFF) && (sh[2] == 8'h00) && (sh[1] == 8'h00);
  assign blank_now = det || (code_cnt != 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sh       <= '{default: 8'h00};
      vs_sh    <= '0;
      hs_sh    <= '0;
      h_st     <= 1'b1;
      v_st     <= 1'b1;
      code_cnt <= '0;
      vsync_o  <= 1'b0;
      hsync_o  <= 1'b0;
      vblank_o <= 1'b1;
      hblank_o <= 1'b1;
      de_o     <= 1'b0;
      data_o   <= '0;
    end else begin
      sh    <= '{cam_data, sh[0], sh[1], sh[2]};
      vs_sh <= {vs_sh[2:0], cam_vsync};
      hs_sh <= {hs_sh[2:0], cam_hsync};
      if (det) begin
        v_st     <= sh[0][5];
        h_st     <= sh[0][4];
        code_cnt <= 2'd3;
      end else if (code_cnt != 2'd0) begin
        code_cnt <= code_cnt - 1'b1;
      end
      vsync_o  <= vs_sh[3];
      hsync_o  <= hs_sh[3];
      vblank_o <= v_st;
      hblank_o <= h_st || blank_now;
      de_o     <= !(v_st || h_st || blank_now);
      data_o   <= sh[3];
    end
  end
endmodule
