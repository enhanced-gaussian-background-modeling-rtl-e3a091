// Frame reader on a VFBC read port (the "VFBC-XVSI" blocks of the SG
// pipeline and the read-direction VDMA of the display pipeline).
//
// A one-cycle vsync pulse starts a frame: the block writes the four-word
// read command packet (see mod_pkg) into the command FIFO, waiting while it
// is full, then hands out the H_ACTIVE*V_ACTIVE words of the frame. The
// read FIFO is first-word-fall-through: a word is available whenever
// rd_empty is low. The consumer sees `avail`/`data` and takes the word in
// any cycle it raises `req` while `avail` is high; rd_read is that product,
// so the stream advances at up to one word per clock.
//
// Frame stores: with NUM_FSTORES > 1 the buffer address rotates by
// FSTORE_BYTES every frame and the reader lags the writer by FSTORE_LAG
// stores, so it reads the last complete frame while the next is written.
// The rotation and the packet layout are this design's choices; the
// document says only that the packet gives the resolution and direction.
// A vsync during a frame restarts the block with a new packet; a vsync
// that arrives while a packet is being sent is ignored, so packets always
// reach the port whole.
module vfbc_reader
  import mod_pkg::*;
#(
  parameter int unsigned H_ACTIVE     = 1280,
  parameter int unsigned V_ACTIVE     = 720,
  parameter logic [30:0] BASE_ADDR    = 31'h0,
  parameter int unsigned STRIDE_BYTES = H_ACTIVE * 4,
  parameter int unsigned NUM_FSTORES  = 1,
  parameter logic [30:0] FSTORE_BYTES = 31'h0040_0000,
  parameter int unsigned FSTORE_LAG   = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync,
  // VFBC command port
  output logic [31:0] cmd_data,
  output logic        cmd_write,
  input  logic        cmd_full,
  // VFBC read port
  input  logic [31:0] rd_data,
  input  logic        rd_empty,
  output logic        rd_read,
  // stream side
  input  logic        req,
  output logic        avail,
  output logic [31:0] data,
  output logic        frame_active
);
  localparam int unsigned NWORDS = H_ACTIVE * V_ACTIVE;
  localparam int unsigned CW     = $clog2(NWORDS + 1);
  localparam int unsigned SW     = (NUM_FSTORES > 1) ? $clog2(NUM_FSTORES) : 1;

  typedef enum logic [1:0] {IDLE, CMD, STREAM} state_t;
  state_t        state;
  logic [1:0]    idx;
  logic [CW-1:0] cnt;
  logic [SW-1:0] store;      // store of the frame being read
  vfbc_cmd_t     cmd;

  always_comb begin
    cmd.x_bytes    = 15'(H_ACTIVE * 4);
    cmd.write      = 1'b0;
    cmd.addr       = BASE_ADDR + 31'(store) * FSTORE_BYTES;
    cmd.y_lines_m1 = 24'(V_ACTIVE - 1);
    cmd.stride     = 24'(STRIDE_BYTES);
  end

  assign cmd_write    = (state == CMD) && !cmd_full;
  assign cmd_data     = vfbc_cmd_word(cmd, idx);
  assign avail        = (state == STREAM) && !rd_empty;
  assign data         = rd_data;
  assign rd_read      = avail && req;
  assign frame_active = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      idx   <= '0;
      cnt   <= '0;
      // so that the first frame reads store (0 - FSTORE_LAG) mod NUM_FSTORES
      store <= SW'((2 * NUM_FSTORES - 1 - FSTORE_LAG) % NUM_FSTORES);
    end else if (vsync && state != CMD) begin
      state <= CMD;
      idx   <= '0;
      cnt   <= '0;
      store <= (NUM_FSTORES > 1) ? SW'((32'(store) + 1) % NUM_FSTORES) : '0;
    end else begin
      unique case (state)
        CMD: if (!cmd_full) begin
          idx <= idx + 2'd1;
          if (idx == 2'd3) state <= STREAM;
        end
        STREAM: if (rd_read) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NWORDS - 1)) state <= IDLE;
        end
        default: ;
      endcase
    end
  end
endmodule
