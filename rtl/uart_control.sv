// uart_control: command decoder of the board under test, on the constant
// clock clk_int.
//
// It takes received bytes from uart_rx (rx_valid pulses) and interprets the
// protocol of board_pkg. Load commands collect 16 bytes in a shift buffer
// and commit them to key, msg0, msg1 or conditions only after the last
// byte, so the registers, which the clk_ext domain reads directly, change in
// one step. A capture command runs one test:
//   1. raise enable and msg_sel (msg_sel switches the AES input from Msg_0
//      to Msg_1; the clk_ext side registers it one cycle after it sees it,
//      so the ILA is already enabled when the message changes);
//   2. wait for capture_done (already synchronised to clk_int);
//   3. send capture_data as CAP_BYTES bytes, most significant first, through
//      uart_tx (tx_start pulses when tx_ready is high);
//   4. drop enable and msg_sel and raise clear until capture_done falls.
// enable and clear are levels held until the other domain has answered,
// which is how they reach a domain whose clock is slower or faster than
// clk_int. Load commands received during a capture are ignored until it
// ends; unknown command bytes are dropped. The sequence of enable,
// capture_done, sending and clear follows the published method; the command set,
// the byte order and the handshake levels are this design's choices.
module uart_control
  import board_pkg::*;
#(
  parameter int unsigned CAP_BYTES = 16     // bytes of capture_data
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from uart_rx
  input  logic [7:0]             rx_data,
  input  logic                   rx_valid,
  // to uart_tx
  output logic [7:0]             tx_data,
  output logic                   tx_start,
  input  logic                   tx_ready,
  // stimulus and trigger setup
  output logic [127:0]           key,
  output logic [127:0]           msg0,
  output logic [127:0]           msg1,
  output logic [127:0]           conditions,
  // capture handshake with ila_tiny (through the clock-domain bridge)
  output logic                   enable,
  output logic                   msg_sel,
  output logic                   clear,
  input  logic                   capture_done,
  input  logic [CAP_BYTES*8-1:0] capture_data
);

  typedef enum logic [2:0] {IDLE, LOAD, WAIT_DONE, SEND, SEND_WAIT, CLEAR} state_t;

  localparam int unsigned BW = $clog2(CAP_BYTES + 1) > 5 ? $clog2(CAP_BYTES + 1) : 5;

  state_t        state;
  cmd_e          target;
  logic [119:0]  buffer;   // first 15 bytes of a load
  logic [BW-1:0] count;

  always_comb begin
    tx_data  = capture_data[CAP_BYTES*8 - 1 - 8*count -: 8];
    tx_start = (state == SEND) && tx_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      target     <= CMD_KEY;
      buffer     <= '0;
      count      <= '0;
      key        <= KEY_INIT;
      msg0       <= MSG0_INIT;
      msg1       <= MSG1_INIT;
      conditions <= COND_INIT;
      enable     <= 1'b0;
      msg_sel    <= 1'b0;
      clear      <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (rx_valid) begin
          count <= '0;
          unique case (rx_data)
            CMD_KEY, CMD_MSG0, CMD_MSG1, CMD_COND: begin
              target <= cmd_e'(rx_data);
              state  <= LOAD;
            end
            CMD_CAPT: begin
              enable  <= 1'b1;
              msg_sel <= 1'b1;
              state   <= WAIT_DONE;
            end
            default: ;
          endcase
        end
        LOAD: if (rx_valid) begin
          buffer <= {buffer[111:0], rx_data};
          count  <= count + 1'b1;
          if (count == BW'(15)) begin
            unique case (target)
              CMD_KEY:  key        <= {buffer[119:0], rx_data};
              CMD_MSG0: msg0       <= {buffer[119:0], rx_data};
              CMD_MSG1: msg1       <= {buffer[119:0], rx_data};
              default:  conditions <= {buffer[119:0], rx_data};
            endcase
            state <= IDLE;
          end
        end
        WAIT_DONE: if (capture_done) begin
          count <= '0;
          state <= SEND;
        end
        SEND: if (tx_ready) state <= SEND_WAIT;
        SEND_WAIT: if (tx_ready) begin
          if (count == BW'(CAP_BYTES - 1)) begin
            enable  <= 1'b0;
            msg_sel <= 1'b0;
            clear   <= 1'b1;
            state   <= CLEAR;
          end else begin
            count <= count + 1'b1;
            state <= SEND;
          end
        end
        CLEAR: if (!capture_done) begin
          clear <= 1'b0;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // handshake rules: clear and enable never overlap; clear only after a capture
  assert property (@(posedge clk) disable iff (!rst_n) !(clear && enable));

endmodule
