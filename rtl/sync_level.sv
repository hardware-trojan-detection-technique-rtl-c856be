// sync_level: STAGES-flop synchronizer that brings a level signal into the
// domain of clk. The signal must stay at a level long enough to be seen,
// which the request/acknowledge levels of board_top guarantee. Reset is
// asynchronous to the destination value RESET_VAL. This design's own
// helper for the clock crossing of cdc_bridge.
module sync_level #(
  parameter int unsigned STAGES    = 2,
  parameter bit          RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= {STAGES{RESET_VAL}};
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

endmodule
