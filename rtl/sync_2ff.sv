// sync_2ff: multi-stage flip-flop synchronizer for a single-bit signal that
// enters a new clock domain.
//
// A signal from another clock domain is asynchronous here and may make the first
// flip-flop that samples it metastable. The chain of STAGES flip-flops (two by
// default) gives that flip-flop a full clock period to settle before the value
// is used, so the metastability does not propagate into the logic. The need for
// such a synchronizer follows the system description; the stage count and the
// reset value are this design's choices.
//
// Timing: d appears on q STAGES rising edges of clk after it is first sampled.
// Reset is asynchronous, active low, and clears the chain to RST_VAL.
module sync_2ff #(
  parameter int unsigned STAGES  = 2,
  parameter logic        RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= {STAGES{RST_VAL}};
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_2ff needs at least two stages");

endmodule
