// ht_trojan: the hardware Trojan planted in round 1 of the AES core, used as
// the test article for path-delay based detection.
//
// Trigger (LUT_A): a single OR gate on two round-1 nets, S0[126] and S0[125],
//   in_b = net_1 | net_2.
// Payload (LUT_B): an AND gate added in front of one existing round-1 output,
//   out_b = f_b & in_b,
// so the circuit keeps its function whenever the trigger is high (it is for
// both calibration messages) and forces that output bit to 0 otherwise. The
// extra gate and the extra net lengthen the paths through LUT_B, which is what
// the frequency sweep detects. The trigger/payload structure follows the
// published method. With INSERTED = 0 the block models the golden circuit: out_b is
// f_b and the trigger gate is absent. Purely combinational.
module ht_trojan #(
  parameter bit INSERTED = 1'b1   // 1: infected circuit, 0: golden circuit
) (
  input  logic net_1,   // S0[126]
  input  logic net_2,   // S0[125]
  input  logic f_b,     // original function of LUT_B
  output logic out_b    // LUT_B output after the payload gate
);

  logic in_b;

  always_comb begin
    in_b  = net_1 | net_2;
    out_b = INSERTED ? (f_b & in_b) : f_b;
  end

endmodule
