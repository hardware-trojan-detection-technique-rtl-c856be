// board_top: the FPGA design of the board under test for path-delay based
// hardware Trojan detection.
//
// The circuit under test, the pipelined AES-128 core, runs on clk_ext, a
// clock whose frequency the host sweeps with an external generator. The
// AES message register alternates between Msg_0, which presets every round-1
// net, and Msg_1, chosen so that all 128 bits of S1 flip. ila_tiny, also on
// clk_ext, triggers when the message equals Conditions (= Msg_1) and records
// S1 two clock periods later. Each bit of S1 that has not reached its new
// value shows a round-1 path slower than one clk_ext period; the host finds,
// per bit, the highest frequency at which the bit is still right, and a
// Trojan shows as a shift of those critical frequencies against the golden
// circuit. The control side (uart_rx, uart_control, uart_tx) runs on the
// constant clk_int and talks to the host over rx_in/tx_out; cdc_bridge
// carries the handshake between the two clocks.
// rst_n is the asynchronous board reset (active low); each clock domain
// gets its own synchronously released copy. ct brings out the ciphertext.
// HT_INSERTED = 1 builds the Trojan-infected variant of the AES core.
module board_top
  import aes_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT  = 417,  // clk_int periods per UART bit
  parameter bit          HT_INSERTED   = 1'b0, // 1: infected AES core
  parameter int unsigned CAPTURE_DELAY = 2,    // clk_ext periods from trigger to sample
  parameter int unsigned ILA_DEPTH     = 1     // S1 samples per capture
) (
  input  logic   clk_int,   // constant control clock
  input  logic   clk_ext,   // swept test clock from the signal generator
  input  logic   rst_n,
  input  logic   rx_in,
  output logic   tx_out,
  output block_t ct
);

  localparam int unsigned CAP_BYTES = 16 * ILA_DEPTH;

  logic rst_int_n, rst_ext_n;

  reset_sync u_rst_int (.clk(clk_int), .arst_n(rst_n), .rst_n(rst_int_n));
  reset_sync u_rst_ext (.clk(clk_ext), .arst_n(rst_n), .rst_n(rst_ext_n));

  // ---------------- clk_int domain ----------------
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_start, tx_ready;
  block_t     key_i, msg0_i, msg1_i, cond_i;
  logic       enable_i, clear_i, msg_sel_i, done_i;
  logic [ILA_DEPTH-1:0][127:0] capture_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(clk_int), .rst_n(rst_int_n), .rx(rx_in),
    .data(rx_data), .valid(rx_valid), .frame_err()
  );

  uart_control #(.CAP_BYTES(CAP_BYTES)) u_ctrl (
    .clk(clk_int), .rst_n(rst_int_n),
    .rx_data(rx_data), .rx_valid(rx_valid),
    .tx_data(tx_data), .tx_start(tx_start), .tx_ready(tx_ready),
    .key(key_i), .msg0(msg0_i), .msg1(msg1_i), .conditions(cond_i),
    .enable(enable_i), .msg_sel(msg_sel_i), .clear(clear_i),
    .capture_done(done_i), .capture_data(capture_data)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(clk_int), .rst_n(rst_int_n), .data(tx_data), .start(tx_start),
    .ready(tx_ready), .tx(tx_out)
  );

  // ---------------- crossing ----------------
  logic   enable_x, clear_x, done_x;
  block_t key_x, msg_x, cond_x;

  cdc_bridge u_cdc (
    .clk_int(clk_int), .rst_int_n(rst_int_n),
    .enable_i(enable_i), .clear_i(clear_i), .msg_sel_i(msg_sel_i),
    .key_i(key_i), .msg0_i(msg0_i), .msg1_i(msg1_i), .conditions_i(cond_i),
    .capture_done_i(done_i),
    .clk_ext(clk_ext), .rst_ext_n(rst_ext_n),
    .enable_x(enable_x), .clear_x(clear_x),
    .key_x(key_x), .msg_x(msg_x), .conditions_x(cond_x),
    .capture_done_x(done_x)
  );

  // ---------------- clk_ext domain ----------------
  block_t s1;

  aes_core #(.HT_INSERTED(HT_INSERTED)) u_aes (
    .clk(clk_ext), .msg(msg_x), .key(key_x), .s0(), .s1(s1), .ct(ct)
  );

  ila_tiny #(
    .TRIG_W(128), .DATA_W(128), .DEPTH(ILA_DEPTH), .CAPTURE_DELAY(CAPTURE_DELAY)
  ) u_ila (
    .clk(clk_ext), .rst_n(rst_ext_n), .enable(enable_x), .clear(clear_x),
    .conditions(cond_x), .trigger_ports(msg_x), .data_ports(s1),
    .capture_done(done_x), .capture_data(capture_data)
  );

endmodule
