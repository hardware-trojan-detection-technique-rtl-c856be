// tb_uart: the testbench sends bytes to uart_rx as serial frames (with a
// bad stop bit once, which must give frame_err) and checks the received
// bytes; it has uart_tx send bytes and decodes tx in the middle of each bit,
// checking the frame timing (10 bit times) and when ready returns.
module tb_uart;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int CPB = 8;

  logic rst_n, rx, rx_valid, rx_err, tx_start, tx_ready, tx;
  logic [7:0] rx_data, tx_data;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut_rx (.clk(clk), .rst_n(rst_n), .rx(rx), .data(rx_data), .valid(rx_valid), .frame_err(rx_err));
  uart_tx #(.CLKS_PER_BIT(CPB)) dut_tx (.clk(clk), .rst_n(rst_n), .data(tx_data), .start(tx_start), .ready(tx_ready), .tx(tx));

  logic [7:0] got [$];
  int errs = 0;
  always @(posedge clk) begin
    if (rx_valid) got.push_back(rx_data);
    if (rx_err) errs++;
  end

  task automatic send_serial(input logic [7:0] b, input bit stop);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (CPB) @(negedge clk); end
    rx = 1'b1; repeat (CPB) @(negedge clk);
  endtask

  task automatic send_tx(input logic [7:0] b);
    logic [7:0] d;
    int t0;
    @(negedge clk);
    while (!tx_ready) @(negedge clk);
    tx_data = b; tx_start = 1; @(negedge clk); tx_start = 0;
    // the start bit began at the last edge
    checks++; if (tx !== 1'b0 || tx_ready) begin failures++; $display("FAIL start bit"); end
    repeat (CPB/2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); d[i] = tx; end
    repeat (CPB) @(negedge clk);
    checks += 2;
    if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
    if (d !== b) begin failures++; $display("FAIL tx byte %h got %h", b, d); end
    // ready returns exactly 10 bit times after start
    t0 = 0;
    while (!tx_ready) begin @(negedge clk); t0++; end
    checks++; if (t0 != CPB/2) begin failures++; $display("FAIL tx frame length, ready %0d cycles late", t0); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] sent [$];
    rst_n = 0; rx = 1; tx_start = 0; tx_data = 0;
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      logic [7:0] b;
      b = (i == 0) ? 8'h45 : (i == 1) ? 8'h00 : (i == 2) ? 8'hff : 8'($urandom);
      sent.push_back(b); send_serial(b, 1'b1);
    end
    send_serial(8'h3c, 1'b0);     // broken stop bit
    repeat (2*CPB) @(negedge clk);
    checks += 2;
    if (got.size() != sent.size()) begin failures++; $display("FAIL rx count %0d", got.size()); end
    if (errs != 1) begin failures++; $display("FAIL frame_err count %0d", errs); end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++; if (got[i] !== sent[i]) begin failures++; $display("FAIL rx byte %0d", i); end
    end
    for (int i = 0; i < 10; i++) send_tx((i == 0) ? 8'hff : (i == 1) ? 8'h00 : 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
