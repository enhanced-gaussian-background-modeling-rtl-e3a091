// Behavioural model of the external multi-port memory controller and its
// frame memory, for testbenches only (not synthesizable).
//
// NP VFBC ports, each in its own clock domain, share one word-addressed
// memory. A port collects a four-word command packet (X size in bytes,
// {write, address}, lines-1, stride); a write transfer then stores every
// wd_write word at the next position of the frame, a read transfer fills a
// first-word-fall-through read FIFO of RD_DEPTH words from memory. When
// STALL_PCT > 0 the read FIFO fill pauses at random and wd_full is raised
// at random (FULL_PCT), so the stream pauses and the overflow paths of the
// design are exercised. cmd_full is never raised. While rst is high every
// port drops its partial command packet and transfer.
module vfbc_mem_model #(
  parameter int NP        = 6,
  parameter int RD_DEPTH  = 64,
  parameter int STALL_PCT = 0,
  parameter int FULL_PCT  = 0,
  parameter bit DEBUG     = 0
) (
  input  logic        rst,
  input  logic        clk      [NP],
  input  logic [31:0] cmd_data [NP],
  input  logic        cmd_write[NP],
  output logic        cmd_full [NP],
  input  logic [31:0] wd_data  [NP],
  input  logic        wd_write [NP],
  output logic        wd_full  [NP],
  output logic [31:0] rd_data  [NP],
  output logic        rd_empty [NP],
  input  logic        rd_read  [NP]
);
  logic [31:0] mem [int];
  int unsigned cmd_seen [NP];
  int unsigned rd_pushed [NP];

  function automatic logic [31:0] peek(int a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction

  for (genvar p = 0; p < NP; p++) begin : g_port
    logic [31:0] pkt [4];
    int   nwords = 0, xwords = 0, lines = 0, stride = 0, base = 0, pos = 0;
    bit   is_write = 0, busy = 0;
    logic [31:0] fifo [$];
    logic full_r = 0;

    assign cmd_full[p] = 1'b0;
    assign wd_full[p]  = full_r;
    assign rd_empty[p] = (fifo.size() == 0);
    assign rd_data[p]  = (fifo.size() != 0) ? fifo[0] : 32'h0;

    function automatic int addr_of(int n);
      return base + (n / xwords) * stride + (n % xwords);
    endfunction

    initial begin
      cmd_seen[p] = 0; rd_pushed[p] = 0;
      forever begin
        logic s_rd, s_cw, s_ww;
        logic [31:0] s_cd, s_wd;
        @(posedge clk[p]);
        // sample what the design drove in the cycle that just ended, then
        // update the model's outputs a little after the edge
        s_rd = rd_read[p]; s_cw = cmd_write[p]; s_cd = cmd_data[p];
        s_ww = wd_write[p]; s_wd = wd_data[p];
        #1;
        if (rst) begin
          nwords = 0; busy = 0; fifo.delete(); full_r = 0;
          continue;
        end
        if (s_rd && fifo.size() != 0) void'(fifo.pop_front());
        if (s_cw) begin
          pkt[nwords] = s_cd;
          nwords++;
          if (nwords == 4) begin
            nwords   = 0;
            xwords   = int'(pkt[0][14:0]) / 4;
            is_write = pkt[1][31];
            base     = int'(pkt[1][30:0]) / 4;
            lines    = int'(pkt[2][23:0]) + 1;
            stride   = int'(pkt[3][23:0]) / 4;
            pos      = 0; busy = 1;
            fifo.delete();
            cmd_seen[p]++;
            if (DEBUG) $display("port %0d cmd write=%0d base=%h x=%0d lines=%0d stride=%0d", p, is_write, base, xwords, lines, stride);
          end
        end else if (busy && is_write && s_ww) begin
          mem[addr_of(pos)] = s_wd;
          if (DEBUG && pos < 2) $display("port %0d wr %h <= %h", p, addr_of(pos), s_wd);
          pos++;
          if (pos == xwords * lines) busy = 0;
        end
        if (busy && !is_write && fifo.size() < RD_DEPTH &&
            !(STALL_PCT > 0 && $urandom_range(0, 99) < STALL_PCT)) begin
          fifo.push_back(peek(addr_of(pos)));
          rd_pushed[p]++;
          pos++;
          if (pos == xwords * lines) busy = 0;
        end
        full_r = (FULL_PCT > 0) && ($urandom_range(0, 99) < FULL_PCT);
      end
    end
  end
endmodule
