// aes_round: one stage of the pipelined AES-128 encryption core.
//
// state_out is registered on the rising clock edge from
//   AddRoundKey(MixColumns(ShiftRows(SubBytes(state_in))), round_key),
// MixColumns being skipped when FINAL = 1 (round 10). One block enters and
// one leaves every cycle; latency is one cycle. The datapath register has no
// reset, as a pipeline stage needs none. The round with HT_INSERTED = 1
// passes its least significant result bit through ht_trojan, whose trigger
// nets are state_in[126] and state_in[125]; which bit carries the payload
// is this design's choice; the method only asks for a used LUT of round 1.
module aes_round
  import aes_pkg::*;
#(
  parameter bit FINAL       = 1'b0,
  parameter bit HT_INSERTED = 1'b0
) (
  input  logic   clk,
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t shifted;
  block_t mixed;
  block_t next_state;
  logic   bit0;

  always_comb begin
    shifted    = shift_rows(sub_bytes(state_in));
    mixed      = FINAL ? shifted : mix_columns(shifted);
    next_state = mixed ^ round_key;
  end

  ht_trojan #(.INSERTED(HT_INSERTED)) u_ht (
    .net_1 (state_in[126]),
    .net_2 (state_in[125]),
    .f_b   (next_state[0]),
    .out_b (bit0)
  );

  always_ff @(posedge clk) state_out <= {next_state[127:1], bit0};

endmodule
