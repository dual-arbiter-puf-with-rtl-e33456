# SR-APUF: an arbiter PUF whose challenge is scrambled by its own output

An arbiter physically unclonable function (PUF) races one edge down two
nominally identical chains of multiplexers. Each challenge bit sets one stage
to pass its two signals straight through or to swap them. Manufacturing spread
in the multiplexer and routing delays decides which edge reaches the arbiter
first. The result is a response bit that is fixed for one chip and differs
between chips. Because the delay differences simply add up along the chain, a
plain arbiter PUF can be modelled from a few thousand challenge-response pairs.

This design, the shift-register arbiter PUF (SR-APUF), never applies the
challenge as given. The challenge goes into a circular shift register, and
the PUF is evaluated once. That 64-bit result depends on the chip and is
unknown to an attacker. Control logic turns it into a shift command:

* **direction**: odd parity shifts left, even parity shifts right. A bit
  `A1`, programmed once into a one-time-programmable (OTP) cell, can invert
  this.
* **distance**: |number of ones − number of zeros| positions.

The register then rotates the challenge by that distance, and the PUF
evaluates the shifted challenge. That second result is the response. With
`trng_en` set, the loop runs without new challenges. Each response steers the
next shift and the next evaluation, and the outputs form a stream of 64-bit
random words.

The size is the published one: 64-bit challenges, 64-stage delay lines, and
64 one-bit cells side by side for a 64-bit response.

## Block structure

```
                    req_challenge
                         |
                  +------v--------------+   shift_en, dir   +------------------+
                  | challenge_shift_reg |<------------------| obfuscation_ctrl |<-- a1 -- otp_a1
                  | (64-bit, circular)  |                   | parity, |1s-0s|  |
                  +------+--------------+                   +--------^---------+
                         | challenge (64)                            | seq = last result
                  +------v----------------------------------------+  |
                  | apuf_array: 64 x apuf_cell                    |--+--> resp_data
                  |   launch FF -> mux_delay_line -> nand_arbiter |
                  |   -> capture FF                               |
                  +-----------------------------------------------+
        srapuf_top: sequencer (settle / race / capture, two passes, free-running)
```

| module | kind | what it is |
|---|---|---|
| `srapuf_top` | RTL | sequencer and wiring of the obfuscation loop |
| `apuf_array` | RTL | 64 cells sharing one challenge |
| `apuf_cell` | RTL wrapper | launch flip-flop, delay lines, arbiter, capture flip-flop |
| `mux_delay_line` | behavioural model | the two racing 64-stage multiplexer lines |
| `nand_arbiter` | behavioural model | cross-coupled NAND arbiter with metastability |
| `challenge_shift_reg` | RTL | bidirectional circular shift register with parallel load |
| `obfuscation_ctrl` | RTL | parity and ones/zeros rule, one shift per clock |
| `otp_a1` | behavioural model | write-once storage of A1 |
| `srapuf_pkg` | package | sizes, `shift_dir_e`, the device-variation function |

## The race and how it is modelled

A PUF's function comes from analog delay, so the delay line and the arbiter
are behavioural models, not synthesizable logic. On an FPGA they are
hand-placed macros built from lookup tables (LUTs). The published build puts
each 1-bit cell into 44 Artix-7 slices: multiplexers and flip-flops packed four
flip-flops and three multiplexers per slice, plus two slices for the
cross-coupled NAND gates. To build this design for silicon or an FPGA, replace
`mux_delay_line` and `nand_arbiter` with such a macro and keep the ports. Every
other module is plain synchronous RTL.

**Delay lines** (`mux_delay_line`). Stage *i* has four delays: top-straight,
top-crossed, bottom-straight and bottom-crossed. Each is
`NOMINAL_PS ± SPREAD_PS` (500 ± 25 ps by default), drawn uniformly from a hash
of `(DEVICE_SEED, CELL_ID, i, path)`. `DEVICE_SEED` therefore plays the role
of "which chip", and `CELL_ID` of "which of the 64 cells". At each edge of
`step`, the model walks the stages to find when the edge leaves each line, and
drives `top_out` and `bot_out` at those times. The output waveforms match a
model with one delayed event per multiplexer, and simulation is hundreds of
times faster. `challenge` is sampled at the step edge. Each level of `step`
must last longer than the slower line (64 × 525 ps ≈ 34 ns at the defaults).

**Arbiter** (`nand_arbiter`). The earlier rising edge wins, and `top_first = 1`
means the top line won. Two edges closer together than `WINDOW_PS` (20 ps)
make the latch metastable. It then settles at random, and the earlier edge
wins with probability ½ + Δt / (2·WINDOW_PS). This is the model's only source
of noise. With the default spreads, about 9 % of races fall inside the window.

**Cell** (`apuf_cell`). The cell registers `launch` into the step, so the step
rises one clock edge after `launch`. The arbiter's decision is sampled into
`resp` on an edge where `capture` is high. The sequencer allows 8 cycles for
the lines to drain and 8 cycles for the race. At 100 MHz that is 80 ns each,
more than twice the slowest line.

## The obfuscation rule

`obfuscation_ctrl` takes the last captured 64-bit word `seq` when `start` is
high:

```
ones   = popcount(seq)
amount = |ones - (64 - ones)|            // always even for 64 bits, 0..64
dir    = (^seq) ^ a1 ? SHIFT_LEFT : SHIFT_RIGHT
```

It then raises `shift_en` for `amount` consecutive cycles. On each of those
cycles `challenge_shift_reg` rotates one position; left means towards the
MSB. `done` follows one cycle after the last shift. Rotating by 64 returns the
original challenge, and so does a distance of 0. Rotation, rather than
shifting in zeros, means no challenge bit is lost.

Example: `seq` with 37 ones has odd parity and distance |37 − 27| = 10. With
A1 = 0 the challenge rotates 10 places left.

## Sequencer and timing

`srapuf_top` runs a small state machine: idle → settle (step low) → race (step
high) → capture → decide → (shift) → …

* **Request.** A challenge is taken on an edge with `req_valid && req_ready`,
  and `req_ready` is high only when idle. The challenge is loaded and settled,
  then raced and captured (first pass, giving `seq_data`). It is then shifted,
  settled, raced and captured again (second pass). `resp_valid` rises
  `2·(SETTLE_CYCLES + RACE_CYCLES + 2) + amount` edges after the accepting
  edge: 36 + amount at the defaults, so 36 to 100 cycles. It lasts one cycle,
  and there is no back-pressure. `seq_data`, `obf_dir` and `obf_amount` show
  what drove the last shift.
* **Free-running.** While `trng_en` is high and no request is waiting, each
  round starts from the idle state. It shifts using the last response, then
  settles, races and captures once. `resp_valid` pulses
  `SETTLE_CYCLES + RACE_CYCLES + amount + 4` cycles apart. The register is not
  reloaded, so the shifts accumulate. After reset, the first round runs a
  first pass to get a sequence. The stream starts from whatever challenge was
  last loaded; all zeros after reset.
* **A1.** `otp_prog_en` programs `otp_prog_value` into A1 on the first edge
  where it is high, and every later attempt is ignored. A1 reads 0 until
  programmed and is not affected by `rst_n`, just as a fuse would not be.

Reset is asynchronous and active low. It clears the challenge register and
the state machine. Two assertions check that the controller is only started
while idle and that the challenge never moves during a race.

## What the simulated chips show

`tb/tb_srapuf_quality.sv` builds six devices (seeds 1–6). It gives each the
same two challenges, for 128 response bits per device, and repeats the
measurement ten times. Typical results, which vary with the simulator's random
seed:

| figure | this model | published for the FPGA build |
|---|---|---|
| uniqueness (mean pairwise inter-device Hamming distance) | 48–52 % | 47.3 % |
| reliability of the first-pass word (plain arbiter PUF) | ≈ 97 % | — |
| reliability of the final SR-APUF response | ≈ 62–71 % | 95.7 % (0–75 °C) |

Read the reliability row with care. It is a property of the obfuscation rule,
not of the noise model. One flipped bit in the first-pass word flips its
parity and changes the distance by 2. The challenge is then shifted
differently, and the whole second response changes, about half its bits. With
64 bits, each a few percent noisy, the first-pass word is rarely identical
from one evaluation to the next. The published 95.7 % implies a first-pass
word that is almost always noise-free, or some error handling that is not
described. Anyone using this design for authentication should expect to need
error correction, or a stable sequence source for the control logic.
Temperature and supply voltage are not modelled.

The free-running stream gives about 50 % ones over 2560 bits in the
end-to-end test. The published design passed the full NIST SP 800-22 suite
(100 sequences of 10⁶ bits). That suite has not been run on this model, and
the model's only entropy is the arbiter noise. Without noise the loop is a
deterministic function of the loaded challenge, and it must eventually cycle.

## Choices made where the description is silent

* "Dual" is read as the two racing multiplexer lines of each cell, with one
  arbiter per cell. A second arbiter per cell and XOR-combined arbiter PUFs are
  not built.
* The order of the two passes, the free-running round, the valid/ready
  handshake, the 100 MHz clock and the settle and race times.
* Circular shifting, one position per clock, and left meaning towards the MSB.
* A1 is one bit and XORs the shift direction. The source says only that the
  sequence and A1 together drive the shift register's select lines.
* A response bit is 1 when the top line wins.
* All delay and noise figures. They parameterise the models and carry no
  meaning for real silicon.

The host side of the published set-up is not part of this RTL: an integrated
logic analyzer and a software application that applied challenges and
collected responses. `req_*`, `resp_*`, `trng_en` and `otp_*` are the ports
such a host would drive.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_STAGES` | 64 | challenge bits = delay-line stages |
| `N_RESP` | 64 | response bits = cells |
| `DEVICE_SEED` | 1 | which simulated chip |
| `NOMINAL_PS`, `SPREAD_PS` | 500, 25 | multiplexer path delay and its ± spread |
| `WINDOW_PS` | 20 | arbiter metastability window; 0 makes the race noise-free |
| `SETTLE_CYCLES`, `RACE_CYCLES` | 8, 8 | step-low and step-high time in clock cycles |

If you raise `N_STAGES` or `NOMINAL_PS`, keep `RACE_CYCLES` × clock period
and `SETTLE_CYCLES` × clock period above `N_STAGES × (NOMINAL_PS + SPREAD_PS)`.

## Simulating

All files use `` `timescale 1ps/1ps `` and need Verilator 5 with `--timing`.
Each testbench prints `TB_RESULT checks=N failures=M`. The end-to-end test at
full size takes a fraction of a second to run:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/srapuf_pkg.sv tb/tb_ref_pkg.sv tb/tb_srapuf_top.sv --top-module tb_srapuf_top
./obj_dir/Vtb_srapuf_top
```

Use the same command for any other testbench; name it and pass its
`--top-module`. `tb_srapuf_quality` prints the uniqueness and reliability
figures, and `+verilator+seed+N` changes the arbiter noise.

`tb/tb_ref_pkg.sv` is the reference the testbenches check against. It
recomputes arrival times arithmetically with the additive delay model, and it
holds the parity, distance and rotation rules. A response bit is checked only
where the two lines differ by more than `WINDOW_PS`, because inside the window
the outcome is random by design. The end-to-end test checks:

* every first-pass word, shift direction and distance, and final response;
* the latency of every request and the length of every free-running round;
* that left shifts, right shifts, rounds with A1 = 1, requests and
  free-running rounds all happened at least once.
