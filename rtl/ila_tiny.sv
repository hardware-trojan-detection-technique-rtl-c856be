// ila_tiny: a minimal integrated logic analyser that runs at the speed of
// the design it watches (clk_ext).
//
// While enable is high the analyser compares trigger_ports with conditions
// every cycle (one match unit, trigger_ports == conditions). The first match
// is the trigger event. Counting the first clock edge after the match as
// edge 1, the analyser stores data_ports at edges CAPTURE_DELAY+1 ..
// CAPTURE_DELAY+DEPTH into the trace memory, then raises capture_done and
// holds the samples on capture_data until clear returns it to the idle
// state. With the default CAPTURE_DELAY = 2 and the AES message as trigger,
// the stored sample is the value that the S1 register took two clock
// periods after the new message appeared, so it shows whether the round-1
// paths settled within one clk_ext period.
// The trigger rule, the enable/capture_done/clear signals and the widths
// (up to 128 signals) follow the published method; the fixed capture delay, the
// sample depth and the reset are this design's own choices.
// capture_data is stable while capture_done is high, so the slower control
// domain may read it without synchronisation.
module ila_tiny #(
  parameter int unsigned TRIG_W        = 128,  // TriggerPorts / Conditions width
  parameter int unsigned DATA_W        = 128,  // DataPorts width
  parameter int unsigned DEPTH         = 1,    // samples per capture
  parameter int unsigned CAPTURE_DELAY = 2     // clock periods from trigger to first sample
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           enable,
  input  logic                           clear,
  input  logic [TRIG_W-1:0]              conditions,
  input  logic [TRIG_W-1:0]              trigger_ports,
  input  logic [DATA_W-1:0]              data_ports,
  output logic                           capture_done,
  output logic [DEPTH-1:0][DATA_W-1:0]   capture_data
);

  if (CAPTURE_DELAY < 1) begin : g_bad_delay
    $error("ila_tiny: CAPTURE_DELAY must be at least 1");
  end

  localparam int unsigned CNT_W = $clog2(CAPTURE_DELAY + DEPTH + 1);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;

  state_t             state;
  logic [CNT_W-1:0]   cnt;     // clock edges since the trigger match, match edge = 1
  logic               match;

  always_comb match = enable && (trigger_ports == conditions);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else if (clear) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (match) begin
          state <= RUN;
          cnt   <= CNT_W'(1);
        end
        RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(CAPTURE_DELAY + DEPTH - 1)) state <= DONE;
        end
        DONE: ;
        default: state <= IDLE;
      endcase
    end
  end

  // trace memory: sample k is taken at edge CAPTURE_DELAY+1+k
  always_ff @(posedge clk) begin
    if (state == RUN && !clear && cnt >= CNT_W'(CAPTURE_DELAY))
      capture_data[cnt - CNT_W'(CAPTURE_DELAY)] <= data_ports;
  end

  assign capture_done = (state == DONE);

  // a capture ends only through clear
  assert property (@(posedge clk) disable iff (!rst_n)
                   capture_done && !clear |=> capture_done);

endmodule
