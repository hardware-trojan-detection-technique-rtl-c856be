# Hardware Trojan detection by critical-frequency analysis of path delays

A hardware Trojan added to a circuit, even a single gate, lengthens the
paths it touches. This design measures path delays without a timing
analyser: the circuit under test is clocked from an external, adjustable
clock `clk_ext`, and the frequency is raised until a flip-flop at the end of
a path starts to capture the wrong value. That *critical frequency* is
found for every observed bit and compared with the critical frequencies of
a known-good (golden) chip. A Trojan shows as a shift in those frequencies.

The RTL here is the FPGA design of the board under test:

* **the circuit under test**, a fully pipelined AES-128 encryption core, with
  an optional Trojan in round 1;
* **a small on-chip logic analyser** (`ila_tiny`) that runs on `clk_ext`
  beside the AES core and records one 128-bit state register at a precise
  clock edge;
* **a UART link and a command controller** on a second, constant clock
  `clk_int`. The host uses it to set up the test and read back the captures.

The signal generator that produces `clk_ext` and the host program that
sweeps the frequency are outside the FPGA. The host's procedure is described
under "Using the board" so that the design can be driven.

## The measurement: one launch, one capture

The round-1 paths of the AES core run from register **S0** (the state after
the initial AddRoundKey) to register **S1** (the state after round 1). The
method uses a pair of messages, chosen for the key
`00112233445566778899aabbccddeeff`:

| message | value | S1 it produces |
|---|---|---|
| Msg_0 | `5aa6044e28ec2d1596cae34557eac82c` | all 128 bits 0 |
| Msg_1 | `f8a89d615fe23b9a3ca0223df0615106` | all 128 bits 1 |

Msg_0 presets every register and net of the pipeline. When the input
switches to Msg_1, every bit of S1 must change from 0 to 1, so every one
of the 128 observed paths is exercised in one clock period. The sequence
on `clk_ext`, counting clock edges from the one that loads Msg_1 into the
message register (edge 0):

```
edge 0 : msg register  <= Msg_1          ILA sees msg == Conditions (match)
edge 1 : S0            <= Msg_1 ^ key    ILA: trigger event, counter = 1
edge 2 : S1            <= round1(S0)     <- the path under test has one period
edge 3 : ILA stores S1                   (CAPTURE_DELAY = 2 edges after the trigger edge)
```

Any bit of S1 that is still 0 in the stored sample belongs to a path longer
than one `clk_ext` period. The message register, S0, S1 and the analyser
are all on `clk_ext`, so only the S0 -> S1 path has to meet the swept
period. The analyser's own paths are much shorter than an AES round.

The analyser compares its trigger inputs with `Conditions` only while
`enable` is high, and takes only the first match. `Conditions` is set to
Msg_1, so the trigger is the message switch itself.

## The circuit under test

`aes_core` is a standard AES-128 encryptor (FIPS-197), fully pipelined. The
stage-0 register holds `S0 = msg ^ key`, and stages 1 to 10 are `aes_round`
instances, the last without MixColumns. The key schedule is pipelined
beside the data (`aes_key_step`): stage *r* expands the key that travelled
down with the block, and the round uses that expansion combinationally. A
new block can enter every clock. S0 appears one clock after the input, S1
two clocks after, and the ciphertext eleven. The S-box is not typed in as a
table: `aes_pkg` computes it during elaboration, as the GF(2^8) inverse
(a^254) followed by the AES affine map.

### The Trojan

With `HT_INSERTED = 1`, round 1 contains the Trojan of `ht_trojan`:

* trigger, one OR gate: `in_b = S0[126] | S0[125]`;
* payload, an AND gate placed in front of one round-1 output:
  `S1[0] = f(S0, key) & in_b`.

For both calibration messages S0[126] or S0[125] is 1. The Trojan therefore
changes no captured value; it only adds a gate and a net to the paths into
S1[0] and into the logic around S0[126:125]. For a message with
S0[126:125] = 00, the payload forces S1[0] to 0, which the testbenches
check. The original experiment planted the Trojan in an already routed FPGA
netlist, with placement and routing frozen. That cannot be written in RTL.
Here the Trojan is ordinary logic, so a golden and an infected build are
placed and routed independently, and their delays also differ by
place-and-route noise. To compare the two builds, lock the placement (for
example by reusing the golden build's placement constraints). The bit that
carries the payload (S1[0]) is a choice of this design.

## Crossing between the two clocks

`clk_ext` is swept from a few MHz up past the critical frequencies (about
350 to 420 MHz in the original FPGA experiment). `clk_int` stays constant.
`cdc_bridge` connects the two clocks:

* `enable`, `clear` and `msg_sel` go from `clk_int` to `clk_ext`, and
  `capture_done` goes back, each through a two-flop synchroniser.
* The levels form a four-phase handshake. `enable` stays high until
  `capture_done` is seen. `clear` stays high until `capture_done` has
  fallen. Each level therefore holds long enough to be seen, whichever clock
  is faster.
* The key, the two messages, `Conditions` and the capture data are not
  synchronised. Each is written only while nothing on the other side reads
  it, so it is steady whenever it is sampled.
* `msg_sel` and `enable` rise on the same `clk_int` edge. The message
  register on `clk_ext` is loaded one clock after its synchronised select, so
  the analyser is armed no later than the message changes.

Each clock domain has its own reset synchroniser on the active-low board
reset `rst_n`.

## Host protocol (UART, 8N1)

The default bit time is `CLKS_PER_BIT = 417` clocks of `clk_int`, that is
115200 baud from a 48 MHz clock. All values are sent most significant byte
first, in the order of their hex strings.

| command | bytes | effect |
|---|---|---|
| `'K'` 0x4B | + 16 | load the AES key |
| `'0'` 0x30 | + 16 | load Msg_0 |
| `'1'` 0x31 | + 16 | load Msg_1 |
| `'C'` 0x43 | + 16 | load Conditions |
| `'E'` 0x45 | none | run one capture; the board answers with 16 bytes of S1 |

After reset the registers already hold the key, Msg_0, Msg_1 and
Conditions = Msg_1 from the table above. A fresh board can capture at once.

`uart_control` commits a load only after the 16th byte, so no partial value
ever reaches the AES core. A capture runs as follows:

1. The controller raises `enable` and `msg_sel`.
2. It waits for `capture_done`.
3. It sends the sample.
4. It drops `enable` and `msg_sel` (the message returns to Msg_0) and holds
   `clear` until the analyser has gone idle.

Unknown bytes are dropped. Load commands that arrive during a capture are
ignored. There is no abort: if Conditions never matches the message, the
capture waits until reset.

## Using the board: the frequency sweep

The host finds the critical frequency of each of the 128 bits with a
coarse-then-fine search:

* The frequency rises in coarse steps of 4.096 MHz.
* When a bit that has not yet been located fails, the host returns to the
  last passing frequency and divides the step by 4. After four divisions
  the step is 0.016 MHz (4.096 / 4^4).
* A bit that fails at the finest step is located. Its critical frequency is
  recorded, and the coarse step is restored for the remaining bits.
* The original method refines the finest steps by bisection. The
  divide-by-4 search used in `tb_freq_sweep` reaches the same 0.016 MHz
  resolution.
* At each frequency it runs 20 captures. A bit counts as failing when more
  than 10 of them differ from the golden reference value.

Repeating the sweep N times gives an N x 128 matrix of critical frequencies.
For each bit, its mean and standard deviation are compared between the
golden and the suspect chip. In the original FPGA experiment, a Trojan of one slice (0.2 % of 626 slices) moved the mean critical
frequencies of S1[0], S1[1], S1[126] and S1[127] up by about 0.5 MHz. The
spread within each build was 0.16 to 0.36 MHz.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `board_top` | `CLKS_PER_BIT` | 417 | UART bit time in `clk_int` clocks |
| `board_top` | `HT_INSERTED` | 0 | 1 builds the Trojan-infected AES core |
| `board_top` | `CAPTURE_DELAY` | 2 | `clk_ext` edges from the trigger edge to the first sample |
| `board_top` | `ILA_DEPTH` | 1 | consecutive S1 samples per capture (16 bytes each) |
| `ila_tiny` | `TRIG_W`, `DATA_W` | 128, 128 | widths of trigger and data ports |
| `cdc_bridge` | `SYNC_STAGES` | 2 | synchroniser length |

The following follow the original method: 128 observed bits, the
two-message launch, the capture two clock periods after the message change,
the enable / capture_done / clear sequence, and the Trojan's structure.
The following are choices of this design: the UART framing and rate, the
48 MHz `clk_int`, the command set and byte order, the synchroniser
handshake, the fixed capture delay, the S-box construction, the register
placement of the key schedule, and the payload bit.

## Files

| file | contents |
|---|---|
| `rtl/board_top.sv` | top level: both clock domains wired together |
| `rtl/aes_pkg.sv` | AES types, S-box generation, round functions |
| `rtl/aes_core.sv`, `aes_round.sv`, `aes_key_step.sv` | pipelined AES-128 |
| `rtl/ht_trojan.sv` | the Trojan (trigger OR, payload AND) |
| `rtl/ila_tiny.sv` | trigger, delayed capture, trace memory |
| `rtl/board_pkg.sv` | command codes and power-on values |
| `rtl/uart_rx.sv`, `uart_tx.sv`, `uart_control.sv` | host link and control |
| `rtl/cdc_bridge.sv`, `sync_level.sv`, `reset_sync.sv` | clock-domain crossing and resets |
| `tb/aes_ref_pkg.sv` | independent behavioural AES model used as reference |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus two end-to-end ones |

## Simulating

Each testbench checks the design against values it computes itself. It
ends by printing `TB_RESULT checks=N failures=M`. For example, the
end-to-end test at default parameters:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/aes_pkg.sv rtl/board_pkg.sv tb/aes_ref_pkg.sv tb/tb_board_top.sv \
  --top-module tb_board_top -o sim && ./obj_dir/sim
```

Replace `tb_board_top` with another testbench name to run that test.

* `tb_board_top` acts as the host. At the default 417 clocks per bit it
  sends commands over `rx_in` and decodes `tx_out`. It runs captures with
  `clk_ext` faster and slower than `clk_int`, with the calibration pair and
  with random keys and messages, and checks each capture against the
  reference AES. It also checks that every command and both clock ratios
  were exercised.
* `tb_board_sweep` runs the host's measurement loop: at each of six
  `clk_ext` frequencies from 100 to 420 MHz it runs 20 captures and applies
  the "more than 10 of 20 differ" rule per bit. It uses two samples per
  capture (`ILA_DEPTH = 2`).
* `tb_freq_sweep` runs the detection procedure as a whole. The AES round
  is replaced by a behavioural model of 128 paths, each with its own delay
  and a little jitter, feeding `ila_tiny`. The host loop is modelled too:
  the coarse-to-fine search, Check_Points, 10 trials per circuit, and the
  mean and standard deviation per bit. The four bits with published
  measurements use those critical frequencies, for both the golden and
  the infected circuit. The test checks that every critical frequency is
  found to within about 0.02 MHz and that the Trojan's shift of about
  0.5 MHz is resolved on every bit.
* `tb_board_top_ht` repeats the end-to-end test on the infected build. The calibration
  capture is unchanged, and the payload is visible for messages that leave
  the trigger low.
* `tb_aes_core` streams one block per clock through a golden and an infected
  core. It checks S0, S1 and the ciphertext at their latencies against the
  FIPS-197 example, the calibration pair and random blocks.
* The block tests `tb_aes_round`, `tb_aes_key_step`, `tb_ht_trojan`,
  `tb_ila_tiny`, `tb_uart`, `tb_uart_control` and `tb_cdc_bridge` check
  their block alone. The ILA test checks the exact edge of every sample.

Apart from the behavioural path model of `tb_freq_sweep`, simulation is
logic only. It shows that the design captures S1 at the right edge and
returns it correctly. It models no real gate delays, so it cannot predict
the critical frequencies of a real chip. That part of the method needs the FPGA, a clock
generator and placed-and-routed golden and infected builds.
