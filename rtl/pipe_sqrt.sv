// Pipelined integer square root: root = floor(sqrt(x)).
//
// Turns the UFix32_16 variance into the UFix16_8 standard deviation that
// the background model stores (sqrt(v * 2^16) = sqrt(v) * 2^8, so no
// rescaling is needed). The implemented design used a vendor CORDIC
// square-root core with a latency of 72 cycles; its insides are not part of
// the design description, so this block is a restoring digit-by-digit
// square root with one result bit per pipeline stage (IN_W/2 stages),
// followed by a delay line that pads the latency to LATENCY cycles.
// Accepts one operand per cycle.
module pipe_sqrt #(
  parameter int unsigned IN_W    = 32,
  parameter int unsigned LATENCY = 72
) (
  input  logic              clk,
  input  logic [IN_W-1:0]   x,
  output logic [IN_W/2-1:0] root
);
  localparam int unsigned OW = IN_W / 2;
  localparam int unsigned RW = OW + 2;          // remainder width
  localparam int unsigned PAD = LATENCY - OW;

  // stage s holds the radicand bits not yet consumed, the partial root and
  // the partial remainder
  logic [IN_W-1:0] xs   [OW+1];
  logic [OW-1:0]   rt   [OW+1];
  logic [RW-1:0]   rem  [OW+1];

  assign xs[0]  = x;
  assign rt[0]  = '0;
  assign rem[0] = '0;

  for (genvar s = 0; s < OW; s++) begin : g_stage
    logic [RW-1:0] shifted, trial_sub;
    logic [RW:0]   trial;
    assign shifted   = {rem[s][RW-3:0], xs[s][IN_W-1 -: 2]};
    assign trial_sub = {rt[s], 2'b01};
    assign trial     = {1'b0, shifted} - {1'b0, trial_sub};
    always_ff @(posedge clk) begin
      xs[s+1] <= xs[s] << 2;
      if (!trial[RW]) begin
        rem[s+1] <= trial[RW-1:0];
        rt[s+1]  <= {rt[s][OW-2:0], 1'b1};
      end else begin
        rem[s+1] <= shifted;
        rt[s+1]  <= {rt[s][OW-2:0], 1'b0};
      end
    end
  end

  delay_line #(.W(OW), .N(PAD)) u_pad (.clk(clk), .rst(1'b0), .d(rt[OW]), .q(root));

  initial assert (LATENCY >= OW) else $error("pipe_sqrt: LATENCY below %0d", OW);
endmodule
