// tb_board_top: end-to-end test of the board under test at its default
// parameters (115200-baud framing at CLKS_PER_BIT = 417, golden AES core).
// The testbench plays the host: it sends commands as serial frames on rx_in,
// decodes the bytes on tx_out, and drives clk_ext at several frequencies,
// faster and slower than clk_int. Every capture is checked against the S1
// state that the reference model computes for the loaded key and Msg_1.
// Counted mechanisms, each of which must occur: every load command, an
// ignored unknown byte, a trigger with capture and clear, captures with
// clk_ext faster and slower than clk_int, a capture after changing the key,
// and the calibration capture with S1 all ones.
module tb_board_top;
  import aes_ref_pkg::*;
  import board_pkg::*;
  int checks = 0, failures = 0;

  localparam int CPB = 417;           // default of board_top
  localparam bit HT  = 1'b0;          // default of board_top

  logic clk_int = 0, clk_ext = 0, rst_n, rx_in = 1, tx_out;
  logic [127:0] ct;
  realtime ext_half = 1.2;
  always #10.4 clk_int = ~clk_int;    // about 48 MHz
  always #(ext_half) clk_ext = ~clk_ext;

  board_top dut (.clk_int(clk_int), .clk_ext(clk_ext), .rst_n(rst_n), .rx_in(rx_in), .tx_out(tx_out), .ct(ct));

  // host receiver: samples tx_out in the middle of each bit
  logic [7:0] rxq [$];
  initial forever begin
    logic [7:0] b;
    @(negedge tx_out);
    repeat (CPB/2) @(posedge clk_int);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk_int); b[i] = tx_out; end
    repeat (CPB) @(posedge clk_int);
    if (tx_out !== 1'b1) begin failures++; $display("FAIL stop bit from board"); end
    rxq.push_back(b);
  end

  int n_load[4], n_ignored, n_capture, n_fast, n_slow, n_newkey, n_calib;

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
    case (cmd)
      CMD_KEY:  n_load[0]++;
      CMD_MSG0: n_load[1]++;
      CMD_MSG1: n_load[2]++;
      default:  n_load[3]++;
    endcase
  endtask

  // one capture; returns the 16 received bytes as a block
  task automatic capture(output logic [127:0] s1);
    int waited = 0;
    rxq.delete();
    send_byte(CMD_CAPT);
    while (rxq.size() < 16 && waited < 40*CPB*16) begin @(posedge clk_int); waited++; end
    chk(rxq.size() == 16, "16 bytes returned");
    for (int i = 0; i < 16; i++) s1[127-8*i -: 8] = (i < rxq.size()) ? rxq[i] : 8'h00;
    repeat (2*CPB) @(posedge clk_int);   // let the board finish its stop bit and clear
    chk(rxq.size() == 16, "no extra bytes");
    n_capture++;
    if (ext_half < 10.4) n_fast++; else n_slow++;
  endtask

  function automatic logic [127:0] expected_s1(input logic [127:0] key, input logic [127:0] m);
    logic [127:0] st [11];
    logic [127:0] s1;
    encrypt(m, key, st);
    s1 = st[1];
    if (HT) s1[0] = st[1][0] & (st[0][126] | st[0][125]);
    return s1;
  endfunction

  initial begin
    #50ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] got, key, m0, m1;
    rst_n = 1;                        // a falling edge starts the reset
    #1 rst_n = 0;
    #200 rst_n = 1;
    repeat (10) @(posedge clk_int);
    // 1. calibration capture straight from reset: S1 must be all ones
    capture(got);
    chk(got == '1, "calibration capture all ones");
    if (got == '1) n_calib++;
    chk(ct == expected_ct(KEY_INIT, MSG0_INIT), "ciphertext of Msg_0 on ct");
    // 2. an unknown byte is ignored, then the pair is reloaded explicitly
    send_byte(8'h7a); n_ignored++;
    load(CMD_MSG0, MSG0_INIT);
    load(CMD_MSG1, MSG1_INIT);
    capture(got);
    chk(got == '1, "capture after reload");
    // 3. new key and messages, clk_ext faster than clk_int
    key = {$urandom, $urandom, $urandom, $urandom};
    m0  = {$urandom, $urandom, $urandom, $urandom};
    m1  = {$urandom, $urandom, $urandom, $urandom};
    load(CMD_KEY, key); n_newkey++;
    load(CMD_MSG0, m0);
    load(CMD_MSG1, m1);
    load(CMD_COND, m1);
    capture(got);
    chk(got == expected_s1(key, m1), "capture with new key");
    // 4. clk_ext slower than clk_int
    ext_half = 37.0;
    capture(got);
    chk(got == expected_s1(key, m1), "capture with slow clk_ext");
    // 5. back to the calibration setting at another fast clock
    ext_half = 2.9;
    load(CMD_KEY, KEY_INIT);
    load(CMD_MSG0, MSG0_INIT);
    load(CMD_MSG1, MSG1_INIT);
    load(CMD_COND, MSG1_INIT);
    capture(got);
    chk(got == '1, "calibration capture again");
    if (got == '1) n_calib++;
    // every mechanism must have happened
    chk(n_load[0] > 0 && n_load[1] > 0 && n_load[2] > 0 && n_load[3] > 0, "all load commands used");
    chk(n_ignored > 0, "unknown byte exercised");
    chk(n_capture >= 5 && n_fast > 0 && n_slow > 0, "captures at fast and slow clk_ext");
    chk(n_newkey > 0 && n_calib >= 2, "new key and calibration captures");
    $display("loads K/0/1/C = %0d/%0d/%0d/%0d, captures %0d (fast %0d, slow %0d), calibration %0d",
             n_load[0], n_load[1], n_load[2], n_load[3], n_capture, n_fast, n_slow, n_calib);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] expected_ct(input logic [127:0] key, input logic [127:0] m);
    logic [127:0] st [11];
    encrypt(m, key, st);
    return st[10];
  endfunction
endmodule
