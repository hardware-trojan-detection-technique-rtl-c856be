// uart_tx: 8N1 UART transmitter. A one-cycle pulse on start while ready is
// high latches data and sends start bit, data bits LSB first and stop bit,
// each CLKS_PER_BIT clocks long; ready is low for the whole frame and rises
// in the cycle after the stop bit ends. tx idles high. Frame format and rate
// are this design's choices (48 MHz, 115200 baud by default).
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 417
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       ready,
  output logic       tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] tick;
  logic [3:0]    bit_cnt;   // bits of the frame still to send after the current one
  logic [8:0]    shreg;     // {data, start bit} shifted out LSB first
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      tick    <= '0;
      bit_cnt <= '0;
      shreg   <= '1;
      tx      <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        busy    <= 1'b1;
        tick    <= '0;
        bit_cnt <= 4'd9;
        shreg   <= {1'b1, data};
        tx      <= 1'b0;           // start bit
      end
    end else if (tick == CW'(CLKS_PER_BIT - 1)) begin
      tick <= '0;
      if (bit_cnt == 0) begin
        busy <= 1'b0;
        tx   <= 1'b1;
      end else begin
        tx      <= shreg[0];
        shreg   <= {1'b1, shreg[8:1]};
        bit_cnt <= bit_cnt - 1'b1;
      end
    end else tick <= tick + 1'b1;
  end

  // the sender must wait for ready
  assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);

endmodule
