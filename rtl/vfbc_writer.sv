// Frame writer on a VFBC write port (the "XVSI-VFBC" blocks of the SG
// pipeline and the write-direction VDMA after the preprocessing pipeline).
//
// A one-cycle vsync pulse starts a frame: the block writes the four-word
// write command packet (see mod_pkg) into the command FIFO, then forwards
// every DATA_VALID word of the frame into the write FIFO, up to
// H_ACTIVE*V_ACTIVE words; later words are ignored. A video stream cannot
// wait, so a word that meets a full write FIFO, or arrives while the
// packet is still being sent, is dropped and raises the sticky `overflow`
// flag (cleared by reset). wd_write follows de combinationally, so words
// move at up to one per clock with no added latency.
// Frame stores rotate as in vfbc_reader; the writer uses store n mod
// NUM_FSTORES for frame n, counting from the first frame after reset.
module vfbc_writer
  import mod_pkg::*;
#(
  parameter int unsigned H_ACTIVE     = 1280,
  parameter int unsigned V_ACTIVE     = 720,
  parameter logic [30:0] BASE_ADDR    = 31'h0,
  parameter int unsigned STRIDE_BYTES = H_ACTIVE * 4,
  parameter int unsigned NUM_FSTORES  = 1,
  parameter logic [30:0] FSTORE_BYTES = 31'h0040_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync,
  input  logic        de,
  input  logic [31:0] data,
  // VFBC command port
  output logic [31:0] cmd_data,
  output logic        cmd_write,
  input  logic        cmd_full,
  // VFBC write port
  output logic [31:0] wd_data,
  output logic        wd_write,
  input  logic        wd_full,
  output logic        overflow,
  output logic        frame_active
);
  localparam int unsigned NWORDS = H_ACTIVE * V_ACTIVE;
  localparam int unsigned CW     = $clog2(NWORDS + 1);
  localparam int unsigned SW     = (NUM_FSTORES > 1) ? $clog2(NUM_FSTORES) : 1;

  typedef enum logic [1:0] {IDLE, CMD, STREAM} state_t;
  state_t        state;
  logic [1:0]    idx;
  logic [CW-1:0] cnt;
  logic [SW-1:0] store;
  vfbc_cmd_t     cmd;

  always_comb begin
    cmd.x_bytes    = 15'(H_ACTIVE * 4);
    cmd.write      = 1'b1;
    cmd.addr       = BASE_ADDR + 31'(store) * FSTORE_BYTES;
    cmd.y_lines_m1 = 24'(V_ACTIVE - 1);
    cmd.stride     = 24'(STRIDE_BYTES);
  end

  assign cmd_write    = (state == CMD) && !cmd_full;
  assign cmd_data     = vfbc_cmd_word(cmd, idx);
  assign wd_write     = (state == STREAM) && de && !wd_full;
  assign wd_data      = data;
  assign frame_active = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      idx      <= '0;
      cnt      <= '0;
      store    <= SW'(NUM_FSTORES - 1);   // first frame goes to store 0
      overflow <= 1'b0;
    end else if (vsync && state != CMD) begin
      state <= CMD;
      idx   <= '0;
      cnt   <= '0;
      store <= (NUM_FSTORES > 1) ? SW'((32'(store) + 1) % NUM_FSTORES) : '0;
    end else begin
      unique case (state)
        CMD: begin
          if (de) overflow <= 1'b1;
          if (!cmd_full) begin
            idx <= idx + 2'd1;
            if (idx == 2'd3) state <= STREAM;
          end
        end
        STREAM: if (de) begin
          if (wd_full) overflow <= 1'b1;
          else begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(NWORDS - 1)) state <= IDLE;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
