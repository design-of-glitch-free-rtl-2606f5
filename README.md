# Strobe-controlled, glitch-free frequency detector

A signal that is built from several gates can glitch when the gates that
produce it switch at slightly different times. The idea behind this design is
a *strobe*: a control signal that lets a group of gates change their outputs
only while it is asserted and holds them otherwise, so related outputs change
together and no intermediate state leaks out. The idea is applied in two
places:

* a **strobe signal module**, a set/reset pair whose two complementary
  outputs change only under the strobe, on one clock edge;
* a **configurable error-free frequency detector** (a "cymometer") whose
  measurement gate is that strobe module, and which measures an unknown
  signal against the system clock with no ±1 count error.

Next to it sits a small **Data-Strobe serial link**, the line code in which a
Strobe line accompanies a Data line so that only one of the two changes per
bit and their XOR is the bit clock.

The RTL is plain synthesizable SystemVerilog. Every block has a
self-checking testbench, and one end-to-end testbench runs the whole design
at its default sizes.

The source design describes these parts mostly by what they do. Their
internal structure here (the gate scheme, the formula, the widths, the
timing) is this implementation's own choice unless stated otherwise. Each
file's header says which is which.

## The frequency detector

```
 ref_sig ──┐   ┌──────────── clock_counter ────────────┐   ┌ freq_divider ┐   ┌ output_latch ┐
           ├──►│ sync ─► glitch_strobe gate ─► cnt/tcnt │──►│ F_CONST*N/M  │──►│  f_out hold  │──► f_out
sig_utest ─┘   └──────────────▲────────────────────────┘   └──────────────┘   └──────────────┘
                      strobe ─┘
```

### Measurement principle: counting over a gate that the signal itself opens

A simple counter counts the unknown signal's edges during a fixed window and
is off by up to one edge, because the window's edges fall at random points in
the signal's period. Here the reference signal `ref_sig` only *asks for* a
window. The real gate opens at the first rising edge of `sig_utest` after
`ref_sig` goes high. It closes at the first rising edge after `ref_sig` goes
low. Inside the gate two counters run:

* `cnt` counts rising edges of `sig_utest`. The edge that opens the gate is
  not counted and the one that closes it is, so `cnt` is an exact whole
  number of periods, N.
* `tcnt` counts `clk` cycles over the same interval, M.

The unknown frequency is then `f = F_clk * N / M`. Its only error is the
quantisation of the two gate edges to the clock: at most one count of M, a
relative error of at most 1/M. The error does not depend on the unknown
frequency. That is why the detector is "error free" in the edge count and why
a longer window buys precision.

### The gate is the strobe signal module

The gate is the `yout` output of a `glitch_strobe` instance:

| glitch_strobe input | connected to                           |
|---------------------|----------------------------------------|
| `ain & bin` (set)   | `ref_sig` high and a `sig_utest` rise  |
| `cin & din` (reset) | `ref_sig` low and a `sig_utest` rise   |
| `strobe`            | the detector's strobe control input    |

While `strobe` is 0 the gate can neither open nor close. Dropping the strobe
during a measurement therefore *stretches* the gate. The stretched gate still
ends on a test-signal edge, so the result is still exact, only over a longer
interval. This is the strobe control's role: a measurement is never cut off
or corrupted when the control changes or the input frequency jumps.

### Counting, latching and saturation (`clock_counter`)

`ref_sig` and `sig_utest` are asynchronous. Each passes through a two-flop
synchronizer, and the rising edge of `sig_utest` is detected in the clock
domain. `del_ref_sig` is the synchronized reference one cycle later. The
test signal must stay high and low for at least two `clk` cycles each, so its
frequency can be at most about a quarter of `clk`.

When the gate closes, `cnt` and `tcnt` are copied to `lat_cnt_result` and
`lat_tcnt_result`, and `meas_done` pulses for one cycle. The counters then
clear. A counter that would wrap stays at its maximum instead, and `ovf` is
reported with that result. With 16-bit counters and a 100 MHz clock the
window can be up to 655 µs long.

### Division and output (`freq_divider`, `output_latch`)

`meas_done` starts the divider. It multiplies the edge count by the constant
`F_CONST` (the clock frequency in Hz) and divides by the clock count with a
restoring divider, one quotient bit per cycle. The result is ready NUM_W + 2
cycles after start; NUM_W is 43 at the defaults. The output latch then loads
the result. `f_out` changes once per measurement, NUM_W + 3 cycles after
`meas_done`, and never shows a partial quotient. `f_valid` rises with the
first result. `f_ovf` marks a result whose counts saturated.

A measurement that ends while the divider is still busy is not divided. Its
counts still appear on `lat_cnt_result`/`lat_tcnt_result`, but `f_out` keeps
the previous result. This only happens when windows are shorter than about
45 clock cycles.

## The strobe signal module (`glitch_strobe`)

Two input gates form requests: `g1 = ain & bin` (set) and `g2 = cin & din`
(reset). A cross-coupled output pair stores the state: `yout` is the state
and `zout` its complement. On a rising `clk` edge with `strobe = 1`, a lone
set request makes `yout = 1` and a lone reset request makes `yout = 0`. With
`strobe = 0`, or with both requests present (the forbidden input of a
set/reset latch), the pair holds. Both outputs come from one flip-flop, so
they can never disagree even for an instant. An assertion in the module
checks that the pair never changes without the strobe.

How this implementation reads the module:

* The source shows the structure (two input gates feeding a cross-coupled
  pair) and says that the strobe lets the gates act or blocks them.
* The gate types, the clocked update and the handling of a simultaneous set
  and reset are choices made here.
* The asynchronous cross-coupled loop is written as a clocked register. That
  keeps the design free of combinational loops and gives the same
  observable behaviour at the clock edges.

## The Data-Strobe link (`ds_encoder`, `ds_decoder`)

Bit n goes on the Data line unchanged. The Strobe line carries the inverse of
the bit when n is even and the bit itself when n is odd. As a result exactly
one line changes from one bit to the next, and `Data ^ Strobe` toggles once
per bit: it is the bit clock.

* **Encoder.** Each cycle with `bit_valid` puts one bit on `d_out`/`s_out`.
  After reset both lines are 0, the state before an even bit. An assertion
  checks the one-line-changes rule.
* **Decoder.** It oversamples both lines with the system clock through
  two-flop synchronizers. It takes a bit whenever exactly one line changed
  (`bit_valid`, `bit_out`) and shows the recovered clock on `rclk`, which is
  1 during even bits. `ds_error` pulses if both lines changed between two
  samples. Each bit must last at least two `clk` cycles. The latency from a
  line change to `bit_valid` is three cycles.

In the top level the link stands beside the detector and has its own ports:
`tx_*` for the transmitter and `rx_*` for the receiver.

## Parameters

| parameter | default     | meaning                                   | origin                                                        |
|-----------|-------------|-------------------------------------------|---------------------------------------------------------------|
| `TCNT_W`  | 16          | width of the clock counter                | follows the source (a four-hex-digit time count)              |
| `CNT_W`   | 16          | width of the edge counter                 | chosen here                                                   |
| `F_CONST` | 100 000 000 | clock frequency in Hz, the divider's scale | chosen here                                                   |
| `NUM_W`   | 43          | width of `F_CONST * cnt` and of `f_out`   | derived: `$clog2(F_CONST+1) + CNT_W` (`glitch_free_pkg::num_width`) |

Package `glitch_free_pkg` holds the defaults. All resets are synchronous and
active low. All logic runs on the rising edge of `clk`.

## How far it can be trusted, and where it departs

* The source describes the frequency detector only as a chain of blocks (a
  clock counter fed by reference and unknown frequencies, a divider with a
  frequency constant, an output latch) plus a few signal names. The gate
  scheme, the formula `F_CONST * N / M`, the synchronizers, saturation and
  all latencies are reasonable engineering choices, not given facts.
* The source says the strobe acts on both rising and falling edges. Here
  this means it governs both the opening and the closing of the gate, and
  both the 0→1 and the 1→0 change of the strobe module's outputs. Nothing is
  clocked on the falling edge of `clk`.
* Two test-enable inputs appear in the source's data flow with no function
  given. They are not implemented.
* The source compares the strobe approach with a NAND-based digitally
  controlled delay line (64 delay elements) and its control-bit driver.
  These are not part of this design. Their function is an analog delay,
  which RTL cannot express.
* The source's comparison of glitching, INL and power concerns transistor
  circuits. Nothing in this RTL measures or reproduces it.

Verification: each block's testbench checks it against values computed
independently, for example:

* the number of test edges the stimulus produced inside the window;
* `F_CONST*N/M` computed in 64-bit arithmetic;
* the true frequency `1e9/T`, to within one clock count.

The end-to-end test runs the top level at its default parameters. It covers
measurements at several frequencies, a strobe hold that stretches the gate,
a measurement dropped while the divider is busy, counter saturation, 300
bits over the looped-back Data-Strobe link, and a forced line error.

## Files and simulation

`rtl/` holds one module or package per file. The hierarchy is:

```
glitch_free_top
├── cymometer
│   ├── clock_counter
│   │   └── glitch_strobe
│   ├── freq_divider
│   └── output_latch
├── ds_encoder
└── ds_decoder
```

`tb/` holds one self-checking testbench per block, `tb_<module>.sv`. Each
prints `TB_RESULT checks=<n> failures=<m>` and ends, and each has a watchdog.
To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/glitch_free_pkg.sv tb/tb_glitch_free_top.sv --top-module tb_glitch_free_top
./obj_dir/Vtb_glitch_free_top
```

Replace the testbench name to run another one. `-Wno-fatal` keeps
Verilator's style warnings (unused package constants, delays computed at run
time in the testbenches) from stopping the build. The end-to-end test takes
well under a minute.
