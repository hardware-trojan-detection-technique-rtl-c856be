// tb_aes_key_step: chains the ten key-expansion steps and compares every
// round key with the reference schedule, for the FIPS-197 example key, the
// calibration key and random keys. Also checks the one-cycle register stage.
module tb_aes_key_step;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [127:0] kin [11];
  logic [127:0] rkey [1:10];
  logic [127:0] kout [1:10];

  assign kin[0] = kin_src;
  logic [127:0] kin_src;
  for (genvar r = 1; r <= 10; r++) begin : g
    aes_key_step #(.ROUND(r)) dut (.clk(clk), .key_in(kin[r-1]), .round_key(rkey[r]), .key_out(kout[r]));
    assign kin[r] = rkey[r];   // combinational chain
  end

  task automatic check_key(input logic [127:0] key);
    logic [127:0] rk [11];
    expand(key, rk);
    kin_src = key;
    #1;
    for (int r = 1; r <= 10; r++) begin
      checks++;
      if (rkey[r] !== rk[r]) begin failures++; $display("FAIL key %h round %0d: %h exp %h", key, r, rkey[r], rk[r]); end
    end
    @(posedge clk); #1;
    for (int r = 1; r <= 10; r++) begin
      checks++;
      if (kout[r] !== rk[r]) begin failures++; $display("FAIL register round %0d", r); end
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // FIPS-197 Appendix A.1 round keys 1 and 10
    kin_src = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    checks += 2;
    if (rkey[1]  !== 128'ha0fafe1788542cb123a339392a6c7605) begin failures++; $display("FAIL fips rk1 %h", rkey[1]); end
    if (rkey[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("FAIL fips rk10 %h", rkey[10]); end
    // calibration key: round key 1 equals the MixColumns output for Msg_0
    kin_src = 128'h00112233445566778899aabbccddeeff; #1;
    checks++;
    if (rkey[1] !== 128'hc0393478846c520f0cf5f8b4c028164b) begin failures++; $display("FAIL rk1 %h", rkey[1]); end
    check_key(128'h00112233445566778899aabbccddeeff);
    for (int i = 0; i < 20; i++) check_key({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
