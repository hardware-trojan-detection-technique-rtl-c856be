// tb_ila_tiny: the data ports carry a free-running counter, so each stored
// sample tells at which clock edge it was taken. Checks that no trigger
// happens with enable low or without a match, that the samples are taken
// exactly CAPTURE_DELAY+1.. edges after the match, that capture_done rises
// right after the last sample and holds until clear, and that clear rearms
// the analyser. A narrow 3-sample instance and one of default size run side
// by side.
module tb_ila_tiny;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int D = 2, DEPTH = 3;

  logic rst_n, enable, clear;
  logic [7:0]   cond, trig, cnt;
  logic [127:0] cond_w, trig_w;
  logic         done_s, done_w;
  logic [DEPTH-1:0][7:0] data_s;
  logic [0:0][127:0]     data_w;

  ila_tiny #(.TRIG_W(8), .DATA_W(8), .DEPTH(DEPTH), .CAPTURE_DELAY(D)) dut_s (
    .clk(clk), .rst_n(rst_n), .enable(enable), .clear(clear), .conditions(cond),
    .trigger_ports(trig), .data_ports(cnt), .capture_done(done_s), .capture_data(data_s));

  ila_tiny dut_w (
    .clk(clk), .rst_n(rst_n), .enable(enable), .clear(clear), .conditions(cond_w),
    .trigger_ports(trig_w), .data_ports({16{cnt}}), .capture_done(done_w), .capture_data(data_w));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= 8'd0; else cnt <= cnt + 8'd1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_capture(input int trig_offset);
    logic [7:0] c;
    // idle a few cycles with no match
    trig = cond ^ 8'h01; trig_w = ~cond_w;
    repeat (3) begin @(negedge clk); chk(!done_s && !done_w, "no trigger without match"); end
    repeat (trig_offset) @(negedge clk);
    trig = cond; trig_w = cond_w; c = cnt;      // match seen at the next edge
    @(negedge clk); trig = cond ^ 8'h01; trig_w = ~cond_w;
    // edges after the match: the small one is done after D+DEPTH edges in all
    for (int e = 2; e <= D + DEPTH; e++) begin
      chk(!done_s, "small capture_done not early");
      if (e == D + 1) chk(!done_w, "wide capture_done not early");
      @(negedge clk);
      if (e == D + 1) chk(done_w, "wide capture_done on time");
    end
    chk(done_s, "small capture_done on time");
    for (int k = 0; k < DEPTH; k++) chk(data_s[k] == c + 8'(D + k), $sformatf("sample %0d timing", k));
    chk(data_w[0] == {16{c + 8'(D)}}, "wide sample timing");
    repeat (5) @(negedge clk);
    chk(done_s && done_w, "capture_done holds");
    chk(data_s[0] == c + 8'(D), "samples hold");
    clear = 1; @(negedge clk); clear = 0;
    chk(!done_s && !done_w, "clear returns to idle");
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; enable = 0; clear = 0; cond = 8'ha5; trig = 8'h00;
    cond_w = {4{32'hdeadbeef}}; trig_w = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // a match with enable low must not trigger
    trig = cond; trig_w = cond_w;
    repeat (6) begin @(negedge clk); chk(!done_s && !done_w, "enable low blocks trigger"); end
    enable = 1;
    run_capture(0);
    run_capture(7);
    // clear during a running capture aborts it
    trig = cond; trig_w = cond_w; @(negedge clk); trig = 0; trig_w = 0;
    clear = 1; @(negedge clk); clear = 0;
    repeat (6) begin @(negedge clk); chk(!done_s && !done_w, "clear aborts capture"); end
    run_capture(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
