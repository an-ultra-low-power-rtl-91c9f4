# Reconfigurable, ageing-resilient ring-oscillator PUF

A ring-oscillator physically unclonable function (RO PUF) turns the random
delay mismatch between two nominally identical ring oscillators into a
response bit: let both rings run for the same time, count their edges, and
output which one was faster. This design makes every ring stage
*reconfigurable*. Each of the 25 stages is a 4-transistor XOR cell that acts
as an inverter when its challenge bit is 1 and as a pass-transistor buffer
when it is 0. The challenge therefore chooses which transistors form the loop,
and one ring pair gives a different bit for each challenge instead of one
fixed bit. The same trick protects against ageing. When the PUF is idle, the
loop is opened and every stage is set to buffer mode, so all nodes sit at 0.
No PMOS transistor then has a negative gate-source voltage, which is the
stress condition behind NBTI ageing.

The RTL contains:

* a behavioural model of the 4T cell and of the 25-stage ring, for
  simulation. Each stage gets its own delay in inverter mode and in buffer
  mode, with a repeatable per-die "process variation";
* the synthesizable measurement logic: edge counters, the comparator and
  the window sequencer of each PUF instance;
* the challenge generator: a 25-bit LFSR, a check on the number of ones,
  and the challenge multiplexers;
* the controller that collects challenge-response pairs;
* a UART transmitter that sends each 32-bit response out.

## The 4T stage and why challenges must have an odd weight

```
          c (rail)                     c=1, c_n=0 : M1/M2 form an inverter,
            |                                       M3/M4 off      out = ~in
   in --[M1/M2 inverter]-- out         c=0, c_n=1 : M1/M2 unpowered, M3 or M4
   in --[M3/M4 pass    ]-- out                      conducts       out =  in
            |
          c_n (rail)
```

The inverter's supply rails are driven by the challenge bit `c` and its
complement `c_n`. One bank of inverters (`challenge_driver`) makes the
complements for all rings. A ring is the 25 stages in series, closed through
an AND gate with `en`:

```
  en ──┐
       AND ─> stage0 ─> stage1 ─> ... ─> stage24 ──┬──> counter
  ┌────┘                                           │
  └────────────────────────────────────────────────┘
```

The loop only oscillates when it inverts an odd number of times. So a
challenge must have an odd number of ones. The controller enforces this: it
applies only LFSR words with an odd number of ones from 3 to 25, or, in the
second mode, words with exactly `n_target` ones (15, 17, 19 and 21 are the
values of interest). With an even weight the ring settles to a fixed state
and both counters stay near 0.

Ring speed depends on the challenge. An inverting stage (about 24 ps in the
model) is faster than a pass-transistor stage (about 43 ps). These two values
are fitted so that 17 inverting stages give about 670 MHz and 21 give about
750 MHz. The ring period is twice the loop delay (AND gate plus every stage in
its configured mode).

## Measuring one bit: `ro_puf`

Each PUF instance has two rings (A and B), two edge counters and a `>`
comparator. The sequencer runs a four-phase handshake with the controller:

| state  | rings    | counters         | leaves when                       |
|--------|----------|------------------|-----------------------------------|
| IDLE   | disabled | hold last counts | `start` = 1                       |
| CLEAR  | disabled | cleared          | one clock                         |
| RUN    | enabled  | count            | `WINDOW_CYCLES` clocks have passed |
| SETTLE | disabled | last edges land  | `SETTLE_CYCLES` (4) clocks        |
| DONE   | disabled | hold             | `start` = 0; `resp` = (A > B)     |

From the clock edge that samples `start`, `done` rises after
`WINDOW_CYCLES + SETTLE_CYCLES + 1` further edges (261 at the defaults). Each
counter is clocked by its own ring and is cleared asynchronously by a
one-clock pulse in the CLEAR state. Neither the clear nor the count changes while the other clock
domain uses them: the rings are stopped whenever the clear changes or the
count is read. So no synchronizer is needed, and lint tools report the
mixed synchronous and asynchronous use of the state register. The counters
saturate instead of wrapping. The window, the settle time, the handshake and
the 16-bit counter width are this implementation's own choices.

## Collecting challenge-response pairs: `puf_controller`

```
 seed/load ─> lfsr25 ─> ones_checker ─valid─┐
                │                           ├─> challenge mux ─> challenge_driver ─> 32 x ro_puf
                └───────────────────────────┘         (0 when idle)          │
                         ^                                        done[31:0] │ resp[31:0]
                         └───────── step when disallowed / when stored <─────┘
```

1. `load`=1 shifts `seed` into the LFSR, one bit per clock. After 25 clocks
   the first bit shifted in sits in the last stage. Loading is accepted only
   while the controller is idle.
2. With `run`=1, the LFSR steps once per clock until the checker accepts the
   word.
3. The accepted word drives the challenge lines and `start` goes high to all
   32 instances. They all measure in parallel with the same challenge.
4. When every `done` is high, the 32 bits and the challenge are stored in
   `resp_word` / `chal_word`. Then `start` drops and the controller waits
   until every `done` has fallen.
5. `resp_valid` offers the word to the UART. When it is taken, the LFSR
   steps and the search starts again.

The LFSR is a 25-stage Fibonacci shift register. The next bit into stage 0
is `q[2] ^ q[24]`, which has the maximal period 2^25-1. An input multiplexer
chooses between that feedback and the serial seed. The published circuit
gates the clock; here a clock enable does the same job. The challenge lines
are zero whenever no measurement is running, which keeps idle rings in the
stress-free all-buffer state.

## Read-out: `uart_tx`

Each stored response goes out as 4 bytes, least significant byte first. Each
byte is an 8N1 frame: a start bit of 0, eight data bits LSB first, and a stop
bit of 1. A bit lasts `CLKS_PER_BIT` clocks (868, which is 115200 baud at
100 MHz). At the defaults, sending takes 34,720 clocks per response, much
longer than the measurement (about 270 clocks). So the controller normally
waits for the UART. The next measurement runs while the previous word is
being sent.

## Top level: `ro_puf_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock (100 MHz assumed), asynchronous active-low reset |
| `load`, `seed` | in | 1 | serial seed load (idle only) |
| `run` | in | 1 | collect pairs while high |
| `mode_n` | in | 1 | 0: any odd number of ones 3..25; 1: exactly `n_target` |
| `n_target` | in | 5 | required number of ones in mode 1 |
| `resp_word` | out | 32 | last response (bit i from instance i) |
| `chal_word` | out | 25 | challenge of `resp_word` |
| `resp_valid` | out | 1 | response waiting for the UART |
| `busy` | out | 1 | controller not idle |
| `uart_txd` | out | 1 | serial output |

| parameter | default | origin |
|-----------|---------|--------|
| `N_STAGES` | 25 | design (25-stage rings, 25-bit challenge) |
| `N_PUF` | 32 | design (32 ring pairs, 32-bit response) |
| `W_CNT` | 16 | own choice |
| `WINDOW` | 256 clocks | own choice |
| `CLKS_PER_BIT` | 868 | own choice (115200 baud at 100 MHz) |
| `DIE_SEED` | 1 | simulation only: selects the simulated die |

Shared constants, the delay fit and the variation function are in
`rtl/puf_pkg.sv`.

## What is behavioural and what is synthesizable

`xor4t_cell` and `config_ro` are behavioural models. They use `#` delays and
form a combinational loop on purpose, and they exist to make the rest of the
design simulate. In silicon they are a transistor-level cell and a
hand-placed ring. On an FPGA the 4T cell becomes an XOR gate of the
challenge bit and the stage input, and the ring becomes a placed loop of such
gates. Lint tools report the loop, and a latch on the cell output (the model
holds its output when both rails are equal, which is not a legal control
state). Everything else is ordinary synchronous RTL: `challenge_driver`,
`ro_counter`, `freq_compare`, `ro_puf`, `lfsr25`, `ones_checker`,
`puf_controller`, `uart_tx` and `ro_puf_top`.

Variation model: each stage delay is the nominal value plus a uniform offset
in ±2 ps. The offset comes from a hash of (die seed, instance, ring, stage,
mode) in `puf_pkg::stage_delay_ps`. This is only a way to make the simulated
rings differ repeatably. It does not model temperature, supply or ageing, so
reliability and ageing behaviour cannot be studied with this RTL.

## Departures and open points

* The measurement window, counter width, handshake, UART format and clock
  frequency are not specified by the underlying design and were chosen
  here.
* The rule "odd number of ones from 3 to 25" rejects words with a single one,
  although such a ring would also oscillate.
* The published controller gates the LFSR clock; this RTL uses an enable.
* Only one PUF (32 instances) is built. A board with several placements
  instantiates `ro_puf_top` several times, with a separate `DIE_SEED` each
  in simulation.

## Simulating

Testbenches are in `tb/`. Each one prints `TB_RESULT checks=N failures=M`.
Build with Verilator 5 and timing support, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/puf_pkg.sv tb/ring_ref_pkg.sv tb/tb_ro_puf_top.sv \
    --top-module tb_ro_puf_top -o sim && obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_xor4t_cell` | invert / pass / hold, and both delays to within 2 ps |
| `tb_challenge_driver` | c = challenge, c_n = complement |
| `tb_config_ro` | edge count = time / reference period (±1) for odd weights 3..25; no oscillation for even weights; all nodes 0 at rest |
| `tb_ro_counter` | counts, asynchronous clear, saturation |
| `tb_freq_compare` | `>` against a reference, including ties |
| `tb_ro_puf` | done latency (262 clocks including the sampling edge), counts against reference periods, response bit, handshake, counts held while idle |
| `tb_lfsr25` | serial seed load, 200k steps against a reference, period 31 of a 5-bit instance with the same tap |
| `tb_ones_checker` | both modes against a reference population count |
| `tb_puf_controller` | challenge sequence with skipping in both modes, zero challenge when idle, stored words |
| `tb_uart_tx` | framing, byte order, word time |
| `tb_ro_puf_top` | end to end at 8 instances and a 32-clock window: challenges, response bits against reference periods, serial bytes, and that each mechanism (skip, measure, send, mode switch, rest state) happened |
| `tb_ro_puf_top_full` | the same at the default parameters (32 instances, 256-clock window, 115200 baud): seed load, skipping, one measured, stored and transmitted pair |

`tb/ring_ref_pkg.sv` holds the reference arithmetic: a ring's period is
2 × (AND delay + the sum of the stage delays in their configured modes), and
the expected edge count is window / period. A response bit is checked only
when the two rings' expected counts differ by more than two edges. Closer
pairs are legitimately undecided.

The ring model is event-heavy. Every stage transition is a scheduled event,
so the full-size simulation (64 rings, one pair) takes about five to seven
minutes, while the reduced end-to-end test takes under half a minute. In a
run of two full-size pairs, 59 of the 64 response bits were clearly decided
(expected counts more than two edges apart), and all 59 matched the
reference.
