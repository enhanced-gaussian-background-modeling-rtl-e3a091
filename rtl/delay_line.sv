// Fixed delay line: q is d delayed by N clock cycles.
//
// The enhanced SG pipeline keeps VSYNC, DATA_VALID and the data paths of
// the algorithm logic aligned with register delays ("Delay 85" and the
// z^-k blocks of the algorithm datapath). This is that delay: a chain of N
// W-bit registers. Data delays leave RESET at 0 and have no reset, so they
// map onto shift-register resources; control delays (VSYNC, DATA_VALID)
// set RESET = 1 so that a synchronous rst clears every stage and no stale
// pulse leaves the line after reset. N = 0 gives a plain wire.
// Latency: exactly N cycles, one sample per cycle.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 85,
  parameter bit          RESET = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      if (RESET && rst) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end
endmodule
