// tb_cdc_bridge: runs the bridge with clk_ext faster and then slower than
// clk_int. Checks that each control level arrives within SYNC_STAGES+1
// destination edges, that the message register switches between Msg_0 and
// Msg_1 no earlier than enable arrives (the order the analyser relies on),
// and that key and conditions are registered on clk_ext.
module tb_cdc_bridge;
  int checks = 0, failures = 0;
  logic clk_int = 0, clk_ext = 0;
  realtime ext_half = 3.0;
  always #5 clk_int = ~clk_int;
  always #(ext_half) clk_ext = ~clk_ext;

  logic rst_n, enable_i, clear_i, msg_sel_i, done_i, enable_x, clear_x, done_x;
  logic [127:0] key_i, msg0_i, msg1_i, cond_i, key_x, msg_x, cond_x;

  cdc_bridge dut (
    .clk_int(clk_int), .rst_int_n(rst_n), .enable_i(enable_i), .clear_i(clear_i),
    .msg_sel_i(msg_sel_i), .key_i(key_i), .msg0_i(msg0_i), .msg1_i(msg1_i),
    .conditions_i(cond_i), .capture_done_i(done_i),
    .clk_ext(clk_ext), .rst_ext_n(rst_n), .enable_x(enable_x), .clear_x(clear_x),
    .key_x(key_x), .msg_x(msg_x), .conditions_x(cond_x), .capture_done_x(done_x));

  // message must never show Msg_1 while enable_x is low
  int order_err = 0;
  always @(posedge clk_ext) if (rst_n && msg_x == msg1_i && !enable_x && msg_sel_i) order_err++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wait_ext(input int n); repeat (n) @(posedge clk_ext); #0.1; endtask
  task automatic wait_int(input int n); repeat (n) @(posedge clk_int); #0.1; endtask

  task automatic round_trip();
    @(negedge clk_int);
    chk(msg_x == msg0_i && !enable_x, "idle selects Msg_0");
    enable_i = 1; msg_sel_i = 1;
    wait_ext(2);
    wait_ext(1); chk(enable_x, "enable arrives in 3 edges");
    wait_ext(1); chk(msg_x == msg1_i, "Msg_1 selected");
    @(negedge clk_ext); done_x = 1;
    wait_int(3); chk(done_i, "capture_done arrives in 3 edges");
    @(negedge clk_int); enable_i = 0; msg_sel_i = 0; clear_i = 1;
    wait_ext(3); chk(clear_x && !enable_x, "clear arrives");
    wait_ext(1); chk(msg_x == msg0_i, "back to Msg_0");
    @(negedge clk_ext); done_x = 0;
    wait_int(3); chk(!done_i, "capture_done falls");
    @(negedge clk_int); clear_i = 0;
    wait_ext(3); chk(!clear_x, "clear falls");
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; enable_i = 0; clear_i = 0; msg_sel_i = 0; done_x = 0;
    key_i = {4{32'h01234567}}; msg0_i = {4{32'h5a5a5a5a}}; msg1_i = {4{32'hf00ff00f}}; cond_i = {4{32'h89abcdef}};
    #30 rst_n = 1;
    wait_ext(2);
    chk(key_x == key_i && cond_x == cond_i, "key and conditions registered");
    key_i = ~key_i; wait_ext(1); chk(key_x == key_i, "key follows in one edge");
    round_trip();
    ext_half = 17.0;                         // clk_ext now slower than clk_int
    wait_ext(2);
    round_trip();
    chk(order_err == 0, "Msg_1 never before enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
