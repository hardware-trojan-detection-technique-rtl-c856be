// cdc_bridge: the crossing between the constant control clock clk_int and
// the swept test clock clk_ext.
//
// The control levels enable, clear and msg_sel go through SYNC_STAGES-flop
// synchronisers into clk_ext, and capture_done goes back the same way into
// clk_int. The handshake keeps every level steady until the other side has
// answered, so each is seen whatever the ratio of the two clocks. The wide
// values (key, the two messages, conditions) are not synchronised: they are
// loaded while no capture runs and are steady when read. On clk_ext the
// bridge registers the AES inputs, msg_x = msg_sel ? msg1 : msg0 and
// key_x = key, and conditions_x, so the AES core and the ILA only see
// clk_ext registers. That the control signals must be stretched to cross
// the two clocks is part of the published method; the synchronisers and the message
// register are this design's way of doing it.
module cdc_bridge #(
  parameter int unsigned SYNC_STAGES = 2
) (
  // clk_int side
  input  logic         clk_int,
  input  logic         rst_int_n,
  input  logic         enable_i,
  input  logic         clear_i,
  input  logic         msg_sel_i,
  input  logic [127:0] key_i,
  input  logic [127:0] msg0_i,
  input  logic [127:0] msg1_i,
  input  logic [127:0] conditions_i,
  output logic         capture_done_i,
  // clk_ext side
  input  logic         clk_ext,
  input  logic         rst_ext_n,
  output logic         enable_x,
  output logic         clear_x,
  output logic [127:0] key_x,
  output logic [127:0] msg_x,
  output logic [127:0] conditions_x,
  input  logic         capture_done_x
);

  logic msg_sel_x;

  sync_level #(.STAGES(SYNC_STAGES)) u_sync_en  (.clk(clk_ext), .rst_n(rst_ext_n), .d(enable_i),  .q(enable_x));
  sync_level #(.STAGES(SYNC_STAGES)) u_sync_clr (.clk(clk_ext), .rst_n(rst_ext_n), .d(clear_i),   .q(clear_x));
  sync_level #(.STAGES(SYNC_STAGES)) u_sync_sel (.clk(clk_ext), .rst_n(rst_ext_n), .d(msg_sel_i), .q(msg_sel_x));
  sync_level #(.STAGES(SYNC_STAGES)) u_sync_dn  (.clk(clk_int), .rst_n(rst_int_n), .d(capture_done_x), .q(capture_done_i));

  always_ff @(posedge clk_ext) begin
    msg_x        <= msg_sel_x ? msg1_i : msg0_i;
    key_x        <= key_i;
    conditions_x <= conditions_i;
  end

endmodule
