// tb_aes_core: streams a new block into the golden and the infected core
// every cycle and compares S0 (after 1 cycle), S1 (after 2) and the
// ciphertext (after 11) with the reference model. Covers the FIPS-197
// example, the calibration pair Msg_0/Msg_1 (S1 all zeros / all ones, both
// cores equal) and random blocks with their own keys; messages whose
// S0[126:125] is 00 must show the Trojan payload on S1[0] whenever the golden
// S1[0] is 1.
module tb_aes_core;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0, payload_seen = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int LAT = 11;
  localparam int N   = 64;

  logic [127:0] msg, key;
  logic [127:0] g_s0, g_s1, g_ct, h_s0, h_s1, h_ct;
  logic [127:0] m_q [N], k_q [N];

  aes_core #(.HT_INSERTED(1'b0)) gold (.clk(clk), .msg(msg), .key(key), .s0(g_s0), .s1(g_s1), .ct(g_ct));
  aes_core #(.HT_INSERTED(1'b1)) inf  (.clk(clk), .msg(msg), .key(key), .s0(h_s0), .s1(h_s1), .ct(h_ct));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_q[0] = 128'h00112233445566778899aabbccddeeff; k_q[0] = 128'h000102030405060708090a0b0c0d0e0f;
    m_q[1] = 128'h5aa6044e28ec2d1596cae34557eac82c; k_q[1] = 128'h00112233445566778899aabbccddeeff;
    m_q[2] = 128'hf8a89d615fe23b9a3ca0223df0615106; k_q[2] = 128'h00112233445566778899aabbccddeeff;
    for (int i = 3; i < N; i++) begin
      m_q[i] = {$urandom, $urandom, $urandom, $urandom};
      k_q[i] = (i % 2) ? k_q[1] : {$urandom, $urandom, $urandom, $urandom};
    end
    // one cycle launches block i; its outputs are checked LAT cycles later
    for (int cyc = 0; cyc < N + LAT; cyc++) begin
      @(negedge clk);
      if (cyc < N) begin msg = m_q[cyc]; key = k_q[cyc]; end
      if (cyc >= 1 && cyc - 1 < N) begin
        logic [127:0] st [11];
        encrypt(m_q[cyc-1], k_q[cyc-1], st);
        checks += 2;
        if (g_s0 !== st[0]) begin failures++; $display("FAIL S0 block %0d", cyc-1); end
        if (h_s0 !== st[0]) begin failures++; $display("FAIL S0 infected block %0d", cyc-1); end
      end
      if (cyc >= 2 && cyc - 2 < N) begin
        logic [127:0] st [11];
        logic [127:0] s1_ht;
        encrypt(m_q[cyc-2], k_q[cyc-2], st);
        s1_ht = st[1];
        s1_ht[0] = st[1][0] & (st[0][126] | st[0][125]);
        if (s1_ht != st[1]) payload_seen++;
        checks += 2;
        if (g_s1 !== st[1]) begin failures++; $display("FAIL S1 block %0d: %h exp %h", cyc-2, g_s1, st[1]); end
        if (h_s1 !== s1_ht) begin failures++; $display("FAIL S1 infected block %0d", cyc-2); end
        if (cyc - 2 == 1) begin checks++; if (g_s1 !== '0) begin failures++; $display("FAIL Msg_0 S1"); end end
        if (cyc - 2 == 2) begin checks += 2; if (g_s1 !== '1 || h_s1 !== '1) begin failures++; $display("FAIL Msg_1 S1"); end end
      end
      if (cyc >= LAT) begin
        logic [127:0] st [11];
        encrypt(m_q[cyc-LAT], k_q[cyc-LAT], st);
        checks++;
        if (g_ct !== st[10]) begin failures++; $display("FAIL ct block %0d: %h exp %h", cyc-LAT, g_ct, st[10]); end
        if (cyc - LAT == 0) begin checks++; if (g_ct !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL FIPS ct"); end end
      end
    end
    checks++;
    if (payload_seen == 0) begin failures++; $display("FAIL Trojan payload never active"); end
    $display("Trojan payload active on %0d of %0d blocks", payload_seen, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
