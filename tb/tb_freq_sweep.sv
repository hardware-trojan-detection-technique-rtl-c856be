// tb_freq_sweep: the whole detection procedure, on ila_tiny and a
// behavioural model of the 128 round-1 paths.
//
// Logic simulation has no gate delays, so the AES round is replaced here by
// a model: S0 turns from Msg_0 to Msg_1 one clock after the message
// register, and at the next edge bit j of S1 becomes 1 only if the clock
// period is at least the path delay d_j (plus a little per-capture jitter);
// one edge later all bits have settled. ila_tiny (default parameters)
// triggers on the message and samples S1 as on the board.
// The host is modelled as described for the method:
//   * Check_Points: 20 captures at one frequency; a bit fails when more than
//     10 of them read wrong;
//   * Change_Freq: raise f in coarse steps of 4.096 MHz; when an unchecked
//     bit fails, go back to the last passing frequency and divide the step by
//     4, down to 0.016 MHz; a bit failing at the finest step is checked, its
//     critical frequency recorded, and the coarse step restored;
//   * N trials per circuit, then mean and standard deviation per bit.
// Path delays: the four bits that the original experiment reports (S1[0],
// S1[1], S1[126], S1[127]) get their measured mean critical frequencies,
// golden and infected; the other bits random ones between 356 and 420 MHz
// with the same shift. Each trial adds one common offset to all bits (the
// same for both circuits). Checks: every critical frequency is found to
// within the finest step, and the infected circuit's shift is resolved.
module tb_freq_sweep;
  int checks = 0, failures = 0;

  localparam int  NBITS = 128, NTRIALS = 10, REPEAT = 20, LIMIT = 10;
  localparam real DF0 = 4.096, DFMIN = 0.016, F_START = 340.0, JITTER = 0.003;
  localparam logic [127:0] MSG0 = 128'h5aa6044e28ec2d1596cae34557eac82c;
  localparam logic [127:0] MSG1 = 128'hf8a89d615fe23b9a3ca0223df0615106;

  real period_ns = 10.0;
  logic clk = 0;
  always #(period_ns / 2.0) clk = ~clk;

  logic rst_n, enable, clear, done;
  logic [127:0] msg, s1;
  logic [0:0][127:0] cap;

  ila_tiny dut (.clk(clk), .rst_n(rst_n), .enable(enable), .clear(clear), .conditions(MSG1),
                .trigger_ports(msg), .data_ports(s1), .capture_done(done), .capture_data(cap));

  // ---- behavioural round-1 paths ----
  real fcrit [NBITS];          // true critical frequency of each path in this trial (MHz)
  logic s0_new, s0_prev;
  always @(posedge clk) begin
    s0_new  <= (msg == MSG1);
    s0_prev <= s0_new;
    if (s0_new && !s0_prev) begin
      for (int j = 0; j < NBITS; j++) begin
        real f_eff;
        f_eff = fcrit[j] + JITTER * ($itor($urandom_range(2000)) / 1000.0 - 1.0);
        s1[j] <= (1000.0 / period_ns <= f_eff);     // settled within one period
      end
    end else s1 <= {NBITS{s0_new}};
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic capture(output logic [127:0] d);
    @(posedge clk); msg <= MSG0; enable <= 1'b1;
    repeat (3) @(posedge clk);
    msg <= MSG1;
    while (!done) @(posedge clk);
    d = cap[0];
    clear <= 1'b1; enable <= 1'b0; msg <= MSG0;
    @(posedge clk); clear <= 1'b0;
  endtask

  // Check_Points: bits wrong in more than LIMIT of REPEAT captures
  task automatic check_points(input real f, output logic [NBITS-1:0] fail);
    int cnt [NBITS];
    logic [127:0] d;
    period_ns = 1000.0 / f;
    foreach (cnt[j]) cnt[j] = 0;
    for (int k = 0; k < REPEAT; k++) begin
      capture(d);
      for (int j = 0; j < NBITS; j++) if (d[j] !== 1'b1) cnt[j]++;
    end
    foreach (cnt[j]) fail[j] = (cnt[j] > LIMIT);
  endtask

  // Change_Freq: coarse-to-fine search of every bit's critical frequency
  task automatic sweep(output real found [NBITS], output int points);
    logic [NBITS-1:0] checked = '0, fail;
    real f = F_START, df = DF0;
    points = 0;
    while (checked != '1 && f < 500.0) begin
      check_points(f, fail);
      points++;
      fail &= ~checked;
      if (fail == '0) f += df;
      else if (df > DFMIN * 1.5) begin
        f -= df; df /= 4.0; f += df;
      end else begin
        for (int j = 0; j < NBITS; j++) if (fail[j]) found[j] = f - DFMIN;
        checked |= fail;
        df = DF0;
        f += df;
      end
    end
    chk(checked == '1, "every bit checked");
  endtask

  initial begin
    #500ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real base [2][NBITS];
    real meas [2][NTRIALS][NBITS];
    real mu [2][NBITS], sg [2][NBITS];
    real offs [NTRIALS];
    int  points, worst_bit;
    real worst;
    rst_n = 1; enable = 0; clear = 0; msg = MSG0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    // golden / infected mean critical frequencies
    for (int j = 0; j < NBITS; j++) begin
      base[0][j] = 356.0 + 64.0 * $itor($urandom_range(100000)) / 100000.0;
      base[1][j] = base[0][j] + 0.47;
    end
    base[0][0] = 417.234;   base[1][0] = 417.705;
    base[0][1] = 418.577;   base[1][1] = 419.094;
    base[0][126] = 356.795; base[1][126] = 357.264;
    base[0][127] = 359.029; base[1][127] = 359.511;
    for (int t = 0; t < NTRIALS; t++) offs[t] = 0.3 * ($itor($urandom_range(2000)) / 1000.0 - 1.0);

    for (int c = 0; c < 2; c++)
      for (int t = 0; t < NTRIALS; t++) begin
        real found [NBITS];
        for (int j = 0; j < NBITS; j++) fcrit[j] = base[c][j] + offs[t];
        sweep(found, points);
        worst = 0.0; worst_bit = 0;
        for (int j = 0; j < NBITS; j++) begin
          real err;
          err = found[j] - fcrit[j];
          meas[c][t][j] = found[j];
          if ((err < 0 ? -err : err) > worst) begin worst = (err < 0 ? -err : err); worst_bit = j; end
        end
        chk(worst <= DFMIN + JITTER, $sformatf("circuit %0d trial %0d: bit %0d off by %f MHz", c, t, worst_bit, worst));
        $display("%s trial %0d: %0d frequency points, largest error %.4f MHz",
                 c ? "infected" : "golden  ", t, points, worst);
      end

    // Eq. mean and variance per bit
    for (int c = 0; c < 2; c++)
      for (int j = 0; j < NBITS; j++) begin
        mu[c][j] = 0.0;
        for (int t = 0; t < NTRIALS; t++) mu[c][j] += meas[c][t][j] / NTRIALS;
        sg[c][j] = 0.0;
        for (int t = 0; t < NTRIALS; t++) sg[c][j] += (meas[c][t][j] - mu[c][j]) ** 2 / NTRIALS;
        sg[c][j] = $sqrt(sg[c][j]);
      end
    for (int j = 0; j < NBITS; j++) begin
      real shift, want;
      shift = mu[1][j] - mu[0][j];
      want = base[1][j] - base[0][j];
      chk(shift > want - 2.0 * (DFMIN + JITTER) && shift < want + 2.0 * (DFMIN + JITTER),
          $sformatf("bit %0d shift %f", j, shift));
    end
    for (int j = 0; j < NBITS; j++)
      if (j < 2 || j > 125)
        $display("S1[%0d]: golden mu %.3f sigma %.3f, infected mu %.3f sigma %.3f MHz",
                 j, mu[0][j], sg[0][j], mu[1][j], sg[1][j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
