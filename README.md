# MID PUF: a multi-incentive, delay-based physical unclonable function

A physical unclonable function (PUF) turns the random manufacturing spread of
a chip's gate and wire delays into a device-specific answer (the *response*)
to a question (the *challenge*). The MID PUF does this on an FPGA using only
its fast carry logic.

Two nominally identical delay lines are built from carry blocks wired as
inverter chains. A free-running clock, not a single step, is fed into both
lines at once. Because a line is several clock periods long, several clock
edges travel down each line at the same time. This is the "multiple
excitation" or "multi-incentive" idea. A bank of flip-flops on every
inverter output takes a snapshot of both lines on one clock edge. Each
line's snapshot shows where its edges have got to. Their positions differ
slightly between the two lines because of process variation. An XOR per tap
marks those differences, and the XOR outputs form the response. A challenge
switches multiplexers in both lines together, so each challenge picks a
different physical path.

This repository holds synthesizable SystemVerilog for the control, capture,
reconfiguration and response logic. The carry blocks are a behavioural model
with per-element delays. The testbenches predict every response bit from
that delay model and check it.

## The delay line: carry blocks as inverters

A carry block (a Xilinx CARRY4, modelled in `mid_fcl_block`) has four carry
multiplexers and four XOR gates, `O[i] = S[i] ^ carry[i]`. If the
multiplexers' data inputs `DI`, `CYINIT` and `CI` are all tied high, every
carry is 1, whatever `S` is. Each XOR then sees a constant 1 and inverts:
`O[i] = ~S[i]`. Wiring `O[i]` back to `S[i+1]` outside the block chains the
four XORs into four inverters end to end.

A line (`mid_delay_line`) is `N_STAGES` = 16 such stages, giving 64 inverter
taps. Every stage holds two parallel carry blocks fed by the same input. A
2:1 multiplexer, steered by one challenge bit, picks which of the two drives
the next stage and the stage's four taps. A 16-bit challenge therefore
chooses one of 65,536 paths. Tap `k` carries the excitation inverted `k+1`
times and delayed by the sum of the selected element delays up to it.

## A MID unit and what a snapshot looks like

`mid_unit` puts two lines side by side, "upper" and "lower". They get the
same excitation and the same challenge, and each has a `mid_sampler` register
bank with enable `EN`. The excitation is the sampling clock itself, so the
snapshot is a picture of the clock wave frozen along each line:

```
tap:      0 1 2 3 4 5 6 ...                         63
upper:    1 0 1 0 0 1 0 1 0 0 1 0 1 ... (phase flips where an edge is)
lower:    1 0 1 0 0 1 0 1 0 1 0 1 0 ... (same pattern, edges slightly shifted)
XOR:      0 0 0 0 0 0 0 0 0 1 1 1 1 ...
```

Between two taps the pattern alternates because of the inverters. Where an
edge of the clock wave sits, the alternation skips a beat. If the lower
line's edge lies a tap further than the upper line's, the two lines disagree
there, and the XOR gives 1. The accumulated delay difference grows along the
line, so later taps are more likely to disagree. Which taps disagree depends
on the two lines' exact delays, and hence on the chip and the challenge.

Most taps agree, so most response bits are 0. Samples taken too early,
before the first excitation edge has crossed the whole line, are worse.
Every tap the wave has not reached still holds the static resting pattern,
which is identical in both lines. Those taps are invalid data and always
compare as 0. This design keeps them out in two ways. The control waits
`FILL_CYCLES` periods before sampling, and it clears the capture registers
at the start of every measurement.

## Measurement sequence

`mid_signal_ctrl` runs one measurement per `start`. Say `start` is seen on
clock edge 0, with `F = FILL_CYCLES` (4 by default):

| edge       | what happens                                                                  |
|------------|-------------------------------------------------------------------------------|
| 0          | challenge latched into `chal_q`; capture registers cleared; state FILL        |
| falling, ½ | clock gate opens (the enable is retimed on the falling edge, so no runt pulse) |
| 1 … F      | `exc` (the gated clock) rises into both lines; the wave fills the lines       |
| F          | EN goes high for one cycle                                                     |
| F+1        | every tap of every line is sampled; the gate closes at the next falling edge  |
| F+2        | response register loads `q_up ^ q_lo`; `resp_valid` is high for one cycle    |

The lines then rest until the next `start`, which makes every measurement
start from the same state. With a 100 MHz clock and the model's 64-tap line
delay of 19 to 32 ns, three to six edges are in flight when the sample is
taken. Four fill periods (40 ns) are longer than the slowest line.

## Response generation

`mid_response_gen` XORs each tap's upper and lower samples. When `NUM_UNITS`
MID units run in parallel, their comparison vectors are XORed together bit
by bit. That second XOR layer pushes zero-heavy bits towards 50 % ones: `k`
independent bits that are each 1 with probability `p` give a 1 with
probability `(1 - (1-2p)^k)/2`. With the default single unit it passes the
comparison through. The result is registered on `load` and flagged by
`valid` one cycle later.

## Challenges

`mid_challenge_gen` is a 16-bit Galois LFSR with feedback mask `0xB400`
(x^16 + x^14 + x^13 + x^11 + 1). It has maximal length and visits all
65,535 non-zero challenges. `seed_load` loads a seed, and a zero seed
becomes 1. In the top, `chal_src = 1` takes challenges from the LFSR, which
steps after every response. `chal_src = 0` takes `chal_ext`.

## Top level: `mid_puf_top`

| port         | dir | width        | meaning                                              |
|--------------|-----|--------------|------------------------------------------------------|
| `clk`        | in  | 1            | excitation and sampling clock (100 MHz intended)     |
| `rst_n`      | in  | 1            | asynchronous active-low reset                        |
| `start`      | in  | 1            | start a measurement (ignored while `busy`)           |
| `chal_src`   | in  | 1            | 1: LFSR challenge, 0: `chal_ext`                     |
| `chal_ext`   | in  | `N_STAGES`   | external challenge                                   |
| `seed_load`  | in  | 1            | load `seed` into the LFSR                            |
| `seed`       | in  | `N_STAGES`   | LFSR seed                                            |
| `busy`       | out | 1            | a measurement is running                             |
| `resp_valid` | out | 1            | one-cycle pulse with the response                    |
| `resp`       | out | `4*N_STAGES` | response                                             |
| `resp_chal`  | out | `N_STAGES`   | the challenge that produced `resp`                   |

| parameter     | default | meaning                                                        |
|---------------|---------|----------------------------------------------------------------|
| `N_STAGES`    | 16      | carry-block stages per line = challenge bits; response = 4×    |
| `NUM_UNITS`   | 1       | MID units folded by the response XOR layer                     |
| `FILL_CYCLES` | 4       | excitation periods before the sample                           |
| `CHIP_SEED`   | 1       | delay model only: which simulated chip                         |
| `NOMINAL_PS`  | 400     | delay model only: nominal inverter + route delay, ps           |
| `SPREAD_PS`   | 200     | delay model only: full width of the uniform delay spread, ps   |

The clock source, either a signal generator or a PLL multiplying the board
clock, is outside the design and arrives on `clk`.

Files: `rtl/mid_pkg.sv` holds the shared constants, the delay-model hash and
the controller state type. There is one module per file:
`mid_fcl_block`, `mid_delay_line`, `mid_sampler`, `mid_unit`,
`mid_response_gen`, `mid_signal_ctrl`, `mid_challenge_gen` and
`mid_puf_top`.

## The delay model (simulation only)

Only `mid_fcl_block` carries delays. It puts a transport delay on each XOR
output. Each element's delay comes from a fixed 32-bit hash of the line seed
and the element index:

```
h  = seed*0x9E3779B1 ^ idx*0x85EBCA77
h ^= h >> 15;  h *= 0xC2B2AE3D;  h ^= h >> 13
d  = NOMINAL_PS - SPREAD_PS/2 + (h mod (SPREAD_PS+1))        [ps]
idx  = (stage*2 + alternative)*4 + bit
seed = CHIP_SEED*1024 + unit*2 + (0 upper | 1 lower)
```

Every simulated chip is therefore repeatable, and different seeds behave
like different devices. The 400 ps nominal and ±100 ps spread are this
design's own numbers, chosen to give multiple excitation at 100 MHz. They
are not measurements. The multiplexers have no delay in the model. The
model has no noise, jitter, temperature or voltage, so every simulated
response repeats exactly.

With these numbers the responses are strongly biased. Over four simulated
chips and 100 challenges about 8 % of bits are 1, and the mean Hamming
distance between two chips is about 11 % of 64 bits. Doubling the clock
to 200 MHz doubles the edges in flight, from 5 to 10, and nearly doubles
the ones. This is the effect behind the claim that a faster clock yields
more useful response bits from the same lines. The published silicon results for
this architecture are about 47 % inter-chip distance and 0.73 % bit errors
over 0 to 70 °C. The gap comes from the delay model, which has no real
variation statistics behind it, and from the unknown details of the
response-balancing logic (below). Do not read the simulated figures as
predictions for hardware.

## Putting it on an FPGA

* Replace `mid_fcl_block` with the device's carry primitive (CARRY4 on
  Spartan-6). Tie `DI`, `CYINIT` and `CI` high and keep the `O[i]`→`S[i+1]`
  wiring. Delays in the model are ignored by synthesis, and the remaining
  logic is the same XOR/mux function.
* The upper and lower lines are logically identical. A synthesis tool that
  is allowed to will merge them, and the response becomes constant 0. The
  carry instances and tap nets carry `keep`/`dont_touch` attributes, but
  also use the vendor's placement constraints. Place the two lines in
  parallel columns, upper and lower blocks side by side, so that both see
  the same routing. The capture flip-flops and the XOR gates should sit in
  the same slices or CLBs as the carry blocks.
* `exc` is a gated clock that drives data logic. Tell the timing tools that
  the paths through the lines are deliberately unconstrained, since they are
  measured rather than met.
* Lint reports a combinational loop through each carry block's `S` port. It
  is false: `O[i]` drives `S[i+1]`, never `S[i]`, and only the whole-vector
  view makes it look circular.

## Choices made here where the architecture leaves them open

* **Sizing.** A 64-bit response from 16 stages of four inverters. There is
  one challenge bit per stage, i.e. 16 bits, which is far more than the
  5,000 challenge–response pairs used to evaluate the architecture. There
  is one MID unit by default.
* **Where the taps are taken.** Each stage's four taps come after its
  multiplexer, from the selected block.
* **Response generation.** The XOR per tap between the two lines is part of
  the architecture. The architecture also describes a response stage that
  removes invalid (all-zero) samples and an XOR layer that removes the bias
  towards zero, but without detail. Here invalid samples are handled by
  timing: fill periods before EN, and a clear at start. The XOR layer folds
  several MID units together, and with one unit it changes nothing. The
  original response stage is also said to tolerate some clock jitter and
  offset. Nothing here models or tests that.
* **Control.** The state sequence, `FILL_CYCLES`, the falling-edge clock
  gate, the challenge latch and the start/busy/valid handshake are all this
  design's own.
* **Challenge generator.** The architecture only names it. An LFSR is used
  here.
* **Carry-in.** `CI` and `CYINIT` are OR-ed in the model, where the device
  uses a multiplexer. Both are tied high here, so this makes no difference.

## Simulating

Everything runs with Verilator 5 (`--timing` is needed for the delay
model). The testbenches are self-checking and print
`TB_RESULT checks=N failures=M`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mid_pkg.sv tb/mid_tb_ref_pkg.sv tb/tb_mid_puf_top.sv \
    --top-module tb_mid_puf_top -Wno-fatal
./obj_dir/Vtb_mid_puf_top
```

| testbench              | what it checks                                                                 |
|------------------------|--------------------------------------------------------------------------------|
| `tb_mid_fcl_block`     | all 1,024 input combinations of the carry equations; each XOR delay to the ps  |
| `tb_mid_delay_line`    | every tap of a line against the predicted waveform, five challenges            |
| `tb_mid_sampler`       | clear/enable/hold against a register model                                     |
| `tb_mid_response_gen`  | three-unit XOR fold, load and valid timing                                     |
| `tb_mid_signal_ctrl`   | EN/load/done cycle by cycle, exc edge count, challenge latch, F = 4 and F = 1  |
| `tb_mid_challenge_gen` | first steps, zero seed, priorities, period 65,535                              |
| `tb_mid_unit`          | both capture banks against prediction, 40 challenges; early sample is invalid  |
| `tb_mid_puf_top`       | 126 measurements on three chips (one with two units), every response bit predicted, latency, LFSR stepping, and that each mechanism (LFSR and external challenges, clear, idle gate, several edges in flight, reconfiguration, XOR layer, repeatability, chip difference) occurred |
| `tb_mid_puf_full`      | the top with all defaults: one external and one LFSR measurement, bit-exact    |
| `tb_mid_puf_uniqueness`| four simulated chips, 100 LFSR challenges: mean inter-chip Hamming distance, ones, repeatability |
| `tb_mid_puf_freq`      | one chip at 100 MHz and at 200 MHz: edges in flight and ones in the responses  |

`mid_tb_ref_pkg` is the testbenches' own copy of the delay formula above.
From it and the known excitation timing it computes the level every tap
holds at the sampling instant. A tap whose instant falls exactly on an
excitation edge is ambiguous and is not compared. These are rare: 16 bits
out of about 24,000 in the top test.
