// uart_rx: 8N1 UART receiver (start bit, 8 data bits LSB first, one stop
// bit, line idle high). rx is first passed through two flip-flops. A falling
// edge starts a frame; the start bit is checked at its middle and every
// further bit is sampled CLKS_PER_BIT clocks after the previous one, that is
// in the middle of its bit time. At the stop bit the byte is presented on
// data with a one-cycle pulse on valid; frame_err pulses instead if the stop
// bit is low. CLKS_PER_BIT = f(clk) / baud rate; the default assumes a
// 48 MHz clock and 115200 baud. The published method names the UART link but
// gives no frame format or rate: these are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 417
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t        state;
  logic [CW-1:0] tick;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    rx_sync;
  logic          rx_s;

  assign rx_s = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync   <= 2'b11;
      state     <= IDLE;
      tick      <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rx_sync   <= {rx_sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!rx_s) begin
          state <= START;
          tick  <= '0;
        end
        START: begin
          if (tick == CW'(CLKS_PER_BIT / 2)) begin
            tick    <= '0;
            bit_idx <= '0;
            state   <= rx_s ? IDLE : DATA;   // glitch: back to idle
          end else tick <= tick + 1'b1;
        end
        DATA: begin
          if (tick == CW'(CLKS_PER_BIT - 1)) begin
            tick    <= '0;
            shreg   <= {rx_s, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= STOP;
          end else tick <= tick + 1'b1;
        end
        STOP: begin
          if (tick == CW'(CLKS_PER_BIT - 1)) begin
            tick  <= '0;
            state <= IDLE;
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else frame_err <= 1'b1;
          end else tick <= tick + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
