// aes_key_step: one stage of the pipelined AES-128 key expansion.
//
// round_key is the combinational expansion of key_in with the round constant
// of step ROUND (1..10); it feeds the AES round of the same pipeline stage.
// key_out registers round_key on the rising edge so that the next stage gets
// the key that belongs to the block it is working on: key and data advance
// together, one stage per cycle, and every block may use its own key.
// No reset: the register is a pipeline stage.
module aes_key_step
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1   // key-expansion step, 1..10
) (
  input  logic   clk,
  input  block_t key_in,      // round key ROUND-1
  output block_t round_key,   // round key ROUND, combinational
  output block_t key_out      // round key ROUND, registered
);

  localparam byte_t RC = rcon(ROUND);

  always_comb round_key = next_round_key(key_in, RC);

  always_ff @(posedge clk) key_out <= round_key;

endmodule
