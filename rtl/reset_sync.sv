// reset_sync: turns the board reset into a reset for one clock domain. It is
// asserted asynchronously with arst_n and released synchronously, STAGES
// rising edges of clk after arst_n goes high. The reset scheme is this
// design's own; the method does not describe one.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) chain <= '0;
    else         chain <= {chain[STAGES-2:0], 1'b1};
  end

  assign rst_n = chain[STAGES-1];

endmodule
