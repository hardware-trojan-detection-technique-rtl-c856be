// aes_core: the circuit under test (Main_Design), a fully pipelined AES-128
// encryption core.
//
// Stage 0 registers S0 = msg ^ key together with the key; stages 1..10 are
// aes_round instances, each fed by an aes_key_step that expands the key of
// the previous stage. S_r is the register at the output of stage r, so S1 is
// the state at the start of round 2. A new block can enter every clock; the
// ciphertext appears LATENCY = 11 clocks after msg and key are presented, and
// S1 two clocks after. S0 and S1 are brought out because the detection method
// observes the round-1 paths from S0 to S1. HT_INSERTED = 1 builds the
// infected circuit, with the Trojan of ht_trojan in round 1.
// The pipelined organisation and the S0/S1 naming follow the published method; the
// register placement of the key schedule is this design's own.
module aes_core
  import aes_pkg::*;
#(
  parameter bit HT_INSERTED = 1'b0
) (
  input  logic   clk,
  input  block_t msg,   // plaintext
  input  block_t key,   // cipher key
  output block_t s0,    // state at the start of round 1
  output block_t s1,    // state at the start of round 2
  output block_t ct     // ciphertext
);

  block_t state [ROUNDS+1];   // state[r] = S_r
  block_t kreg  [ROUNDS+1];   // round key r-1 .. held alongside state[r]
  block_t rkey  [1:ROUNDS];   // combinational round keys

  always_ff @(posedge clk) begin
    state[0] <= msg ^ key;
    kreg[0]  <= key;
  end

  for (genvar r = 1; r <= ROUNDS; r++) begin : g_round
    aes_key_step #(.ROUND(r)) u_key (
      .clk       (clk),
      .key_in    (kreg[r-1]),
      .round_key (rkey[r]),
      .key_out   (kreg[r])
    );

    aes_round #(
      .FINAL       (r == ROUNDS),
      .HT_INSERTED (HT_INSERTED && (r == 1))
    ) u_round (
      .clk       (clk),
      .state_in  (state[r-1]),
      .round_key (rkey[r]),
      .state_out (state[r])
    );
  end

  assign s0 = state[0];
  assign s1 = state[1];
  assign ct = state[ROUNDS];

endmodule
