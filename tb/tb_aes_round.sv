// tb_aes_round: one middle round, one final round and one round with the
// Trojan, against the reference round function. The calibration states of
// round 1 must give S1 = all zeros (Msg_0) and all ones (Msg_1).
module tb_aes_round;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [127:0] s_in, rk, out_mid, out_fin, out_ht;

  aes_round #(.FINAL(1'b0))                       dut_mid (.clk(clk), .state_in(s_in), .round_key(rk), .state_out(out_mid));
  aes_round #(.FINAL(1'b1))                       dut_fin (.clk(clk), .state_in(s_in), .round_key(rk), .state_out(out_fin));
  aes_round #(.FINAL(1'b0), .HT_INSERTED(1'b1))   dut_ht  (.clk(clk), .state_in(s_in), .round_key(rk), .state_out(out_ht));

  task automatic apply(input logic [127:0] s, input logic [127:0] k);
    logic [127:0] em, ef, eh;
    s_in = s; rk = k;
    em = round(s, k, 1'b0);
    ef = round(s, k, 1'b1);
    eh = em;
    eh[0] = em[0] & (s[126] | s[125]);
    @(posedge clk); #1;
    checks += 3;
    if (out_mid !== em) begin failures++; $display("FAIL mid %h -> %h exp %h", s, out_mid, em); end
    if (out_fin !== ef) begin failures++; $display("FAIL final %h -> %h exp %h", s, out_fin, ef); end
    if (out_ht  !== eh) begin failures++; $display("FAIL ht %h -> %h exp %h", s, out_ht, eh); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] rk1;
    rk1 = 128'hc0393478846c520f0cf5f8b4c028164b;
    @(negedge clk);
    apply(128'h5ab7267d6cb94b621e5349fe9b3726d3, rk1);
    checks++; if (out_mid !== '0) begin failures++; $display("FAIL Msg_0 S1 %h", out_mid); end
    apply(128'hf8b9bf521bb75dedb43988863cbcbff9, rk1);
    checks++; if (out_mid !== '1) begin failures++; $display("FAIL Msg_1 S1 %h", out_mid); end
    checks++; if (out_ht !== '1) begin failures++; $display("FAIL Msg_1 S1 with Trojan %h", out_ht); end
    // a state with S0[126] = S0[125] = 0 whose S1[0] is 1 must show the payload
    begin
      int found = 0;
      for (int i = 0; i < 200 && found == 0; i++) begin
        logic [127:0] s;
        s = {$urandom, $urandom, $urandom, $urandom};
        s[126:125] = 2'b00;
        if (round(s, rk1, 1'b0) & 128'h1) begin
          apply(s, rk1);
          checks++; if (out_ht[0] !== 1'b0 || out_mid[0] !== 1'b1) begin failures++; $display("FAIL payload"); end
          found = 1;
        end
      end
    end
    for (int i = 0; i < 100; i++) apply({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
