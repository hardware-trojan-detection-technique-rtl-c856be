// tb_board_sweep: the host's measurement loop run against the board, with a
// short UART bit time and two S1 samples per capture (ILA_DEPTH = 2).
// clk_ext is stepped through a list of frequencies from 100 MHz to 420 MHz,
// the range that holds the critical frequencies of the round-1 paths. At
// each frequency the host runs 20 captures and counts, per bit of S1, how
// many differ from the reference (all ones); a bit is "failing" when more
// than 10 of the 20 differ. The logic simulation has no path delays, so no
// bit may fail at any frequency: the check is that the board sustains
// repeated captures while the clock changes between them, and that both
// samples (S1 two and three periods after the launch) read back in order.
module tb_board_sweep;
  import board_pkg::*;
  int checks = 0, failures = 0;

  localparam int CPB = 16;
  localparam int REPEAT = 20, LIMIT = 10;
  localparam real FREQ_MHZ [6] = '{100.0, 200.0, 300.0, 356.0, 400.0, 420.0};

  logic clk_int = 0, clk_ext = 0, rst_n, rx_in = 1, tx_out;
  logic [127:0] ct;
  realtime ext_half = 5.0;
  always #10 clk_int = ~clk_int;
  always #(ext_half) clk_ext = ~clk_ext;

  board_top #(.CLKS_PER_BIT(CPB), .ILA_DEPTH(2)) dut (
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

  // one capture of two samples, 32 bytes
  task automatic capture(output logic [255:0] s);
    int waited = 0;
    rxq.delete();
    send_byte(CMD_CAPT);
    while (rxq.size() < 32 && waited < 40*CPB*32) begin @(posedge clk_int); waited++; end
    chk(rxq.size() == 32, "32 bytes returned");
    for (int i = 0; i < 32; i++) s[255-8*i -: 8] = (i < rxq.size()) ? rxq[i] : 8'h00;
    repeat (2*CPB) @(posedge clk_int);
  endtask

  initial begin
    #20ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int diff [128];
    int failing, captures = 0;
    logic [255:0] s;
    rst_n = 1;
    #1 rst_n = 0;
    #200 rst_n = 1;
    repeat (10) @(posedge clk_int);
    foreach (FREQ_MHZ[f]) begin
      ext_half = 500.0 / FREQ_MHZ[f];       // half period in ns
      repeat (4) @(posedge clk_int);
      foreach (diff[j]) diff[j] = 0;
      for (int k = 0; k < REPEAT; k++) begin
        capture(s);
        captures++;
        // sample 1 (second 16 bytes) is S1 one period later: still all ones
        chk(s[127:0] == '1, "second sample all ones");
        for (int j = 0; j < 128; j++) if (s[128 + j] !== 1'b1) diff[j]++;
      end
      failing = 0;
      foreach (diff[j]) if (diff[j] > LIMIT) failing++;
      chk(failing == 0, $sformatf("no failing bit at %0.1f MHz", FREQ_MHZ[f]));
      $display("%0.1f MHz: %0d captures, %0d failing bits", FREQ_MHZ[f], REPEAT, failing);
    end
    chk(captures == REPEAT * 6, "all captures run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
