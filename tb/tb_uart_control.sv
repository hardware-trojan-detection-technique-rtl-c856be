// tb_uart_control: feeds command bytes straight into uart_control, stands in
// for uart_tx (ready drops for a few cycles after each start) and for the
// analyser side of the handshake (capture_done follows enable after a delay
// and falls after clear). Checks power-on values, all load commands, that an
// unknown byte and a load arriving during a capture change nothing, the
// order of the sent capture bytes, and the enable/clear sequence.
module tb_uart_control;
  import board_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, rx_valid, tx_start, tx_ready, enable, msg_sel, clear, capture_done;
  logic [7:0] rx_data, tx_data;
  logic [127:0] key, msg0, msg1, conditions, capture_data;

  uart_control dut (
    .clk(clk), .rst_n(rst_n), .rx_data(rx_data), .rx_valid(rx_valid),
    .tx_data(tx_data), .tx_start(tx_start), .tx_ready(tx_ready),
    .key(key), .msg0(msg0), .msg1(msg1), .conditions(conditions),
    .enable(enable), .msg_sel(msg_sel), .clear(clear),
    .capture_done(capture_done), .capture_data(capture_data));

  // stand-in transmitter
  int busy = 0;
  logic [7:0] sent [$];
  always @(posedge clk) begin
    if (tx_start) begin
      if (busy != 0) begin failures++; $display("FAIL start while busy"); end
      sent.push_back(tx_data);
      busy <= 5;
    end else if (busy > 0) busy <= busy - 1;
  end
  assign tx_ready = (busy == 0);

  // stand-in analyser side
  int en_cnt = 0;
  always @(posedge clk) begin
    if (!rst_n) begin capture_done <= 0; en_cnt <= 0; end
    else begin
      if (enable && !clear) en_cnt <= en_cnt + 1; else en_cnt <= 0;
      if (clear) capture_done <= 0;
      else if (en_cnt == 6) capture_done <= 1;
      if (clear && enable) begin failures++; $display("FAIL clear with enable"); end
      if (capture_done && !enable && !clear) begin failures++; $display("FAIL enable dropped before clear"); end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic put_field(input logic [7:0] cmd, input logic [127:0] v);
    put(cmd);
    for (int i = 0; i < 16; i++) put(v[127-8*i -: 8]);
  endtask

  task automatic capture(input logic [127:0] data);
    int n;
    capture_data = data;
    sent.delete();
    put(CMD_CAPT);
    chk(enable && msg_sel && !clear, "enable and msg_sel raised");
    n = 0;
    while (!(clear && !capture_done) && n < 1000) begin @(negedge clk); n++; end
    @(negedge clk);
    chk(!clear && !enable && !msg_sel, "handshake released");
    chk(sent.size() == 16, "16 bytes sent");
    for (int i = 0; i < 16 && i < sent.size(); i++) chk(sent[i] == data[127-8*i -: 8], $sformatf("byte %0d", i));
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] a, b, c, d;
    rst_n = 0; rx_valid = 0; rx_data = 0; capture_data = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(key == KEY_INIT && msg0 == MSG0_INIT && msg1 == MSG1_INIT && conditions == COND_INIT, "power-on values");
    chk(!enable && !clear && !msg_sel, "idle handshake");
    a = {$urandom, $urandom, $urandom, $urandom}; b = {$urandom, $urandom, $urandom, $urandom};
    c = {$urandom, $urandom, $urandom, $urandom}; d = {$urandom, $urandom, $urandom, $urandom};
    put_field(CMD_KEY, a);  chk(key == a, "key loaded");
    put_field(CMD_MSG0, b); chk(msg0 == b, "msg0 loaded");
    put_field(CMD_MSG1, c); chk(msg1 == c, "msg1 loaded");
    put_field(CMD_COND, d); chk(conditions == d, "conditions loaded");
    chk(key == a && msg0 == b && msg1 == c, "other registers untouched");
    put(8'h7a);
    chk(!enable && key == a, "unknown byte ignored");
    capture({$urandom, $urandom, $urandom, $urandom});
    capture(128'h0123456789abcdeffedcba9876543210);
    // a load arriving during a capture is ignored
    capture_data = '1;
    sent.delete();
    put(CMD_CAPT);
    put(CMD_KEY); put(8'h11);
    while (!(clear && !capture_done)) @(negedge clk);
    @(negedge clk);
    chk(key == a, "no load during capture");
    chk(sent.size() == 16, "third capture sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
