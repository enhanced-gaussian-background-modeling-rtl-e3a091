// Shared types and constants of the moving-object-detection design.
//
// The design streams video through pipelines that talk to an external
// multi-port memory controller over "video frame buffer connector" (VFBC)
// ports. Each port takes a four-word command packet that names a frame
// buffer and its direction, then moves 32-bit words through a write FIFO
// or a read FIFO. The packet layout below follows the vendor VFBC:
//   word 0: X size of a line in bytes
//   word 1: {write flag, start address[30:0]}
//   word 2: number of lines minus one
//   word 3: line stride in bytes
// The document only says that the packet carries the resolution and the
// direction; the layout is this design's reading of the vendor port.
// VFBC_DW, VFBC_CMD_LEN, FG_WORD and BG_WORD document the bus width, the
// packet length and the two classification words for code that uses the
// package; no module reads them, so lint lists them as unused.
package mod_pkg;

  localparam int unsigned VFBC_DW      = 32;  // data bus of every VFBC port
  localparam int unsigned VFBC_CMD_LEN = 4;   // words per command packet

  // All ones on the classification stream marks a foreground pixel.
  localparam logic [31:0] FG_WORD = 32'hFFFF_FFFF;
  localparam logic [31:0] BG_WORD = 32'h0000_0000;

  typedef struct packed {
    logic [14:0] x_bytes;
    logic        write;
    logic [30:0] addr;
    logic [23:0] y_lines_m1;
    logic [23:0] stride;
  } vfbc_cmd_t;

  // Word `idx` of the command packet.
  function automatic logic [31:0] vfbc_cmd_word(vfbc_cmd_t c, logic [1:0] idx);
    unique case (idx)
      2'd0:    return {17'd0, c.x_bytes};
      2'd1:    return {c.write, c.addr};
      2'd2:    return {8'd0, c.y_lines_m1};
      default: return {8'd0, c.stride};
    endcase
  endfunction

  // Saturate an unsigned value to 8 bits.
  function automatic logic [7:0] sat8(logic [17:0] v);
    return (v > 18'd255) ? 8'd255 : v[7:0];
  endfunction

endpackage
