// tb_board_top_ht: end-to-end test of the Trojan-infected board
// (HT_INSERTED = 1) with a short UART bit time. The calibration pair must
// still give S1 all ones, since the Trojan keeps its payload inactive
// whenever S0[126] or S0[125] is 1; a Msg_1 with S0[126:125] = 00 whose S1[0]
// would be 1 must come back with S1[0] = 0, the payload showing.
module tb_board_top_ht;
  import aes_ref_pkg::*;
  import board_pkg::*;
  int checks = 0, failures = 0;

  localparam int CPB = 16;

  logic clk_int = 0, clk_ext = 0, rst_n, rx_in = 1, tx_out;
  logic [127:0] ct;
  always #10 clk_int = ~clk_int;
  always #3 clk_ext = ~clk_ext;

  board_top #(.CLKS_PER_BIT(CPB), .HT_INSERTED(1'b1)) dut (
    .clk_int(clk_int), .clk_ext(clk_ext), .rst_n(rst_n), .rx_in(rx_in), .tx_out(tx_out), .ct(ct));

  logic [7:0] rxq [$];
  initial forever begin
    logic [7:0] b;
    @(negedge tx_out);
    repeat (CPB/2) @(posedge clk_int);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk_int); b[i] = tx_out; end
    repeat (CPB) @(posedge clk_int);
    rxq.push_back(b);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx_in = f[i]; repeat (CPB) @(posedge clk_int); end
  endtask

  task automatic load(input cmd_e cmd, input logic [127:0] v);
    send_byte(cmd);
    for (int i = 0; i < 16; i++) send_byte(v[127-8*i -: 8]);
  endtask

  task automatic capture(output logic [127:0] s1);
    int waited = 0;
    rxq.delete();
    send_byte(CMD_CAPT);
    while (rxq.size() < 16 && waited < 40*CPB*16) begin @(posedge clk_int); waited++; end
    chk(rxq.size() == 16, "16 bytes returned");
    for (int i = 0; i < 16; i++) s1[127-8*i -: 8] = (i < rxq.size()) ? rxq[i] : 8'h00;
    repeat (2*CPB) @(posedge clk_int);
  endtask

  initial begin
    #5ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] got, m1;
    logic [127:0] st [11];
    int payload = 0;
    rst_n = 1;
    #1 rst_n = 0;
    #200 rst_n = 1;
    repeat (10) @(posedge clk_int);
    capture(got);
    chk(got == '1, "calibration capture unchanged by the Trojan");
    // messages that leave the trigger low
    for (int tries = 0; tries < 400 && payload < 2; tries++) begin
      m1 = {$urandom, $urandom, $urandom, $urandom};
      encrypt(m1, KEY_INIT, st);
      if (st[0][126:125] == 2'b00 && st[1][0]) begin
        load(CMD_MSG1, m1);
        load(CMD_COND, m1);
        capture(got);
        chk(got[127:1] == st[1][127:1], "S1 bits outside the payload");
        chk(got[0] == 1'b0, "payload forces S1[0] to 0");
        payload++;
      end
    end
    chk(payload == 2, "payload exercised");
    $display("payload captures %0d", payload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
