# Sequential 64-tap FIR filter

This is a finite-impulse-response filter

    y[n] = b[0]·x[n] + b[1]·x[n-1] + … + b[63]·x[n-63]

built to be small rather than fast. A direct-form filter has 64 multipliers. This one has
**one multiplier and one adder**. They are shared among the taps, one tap per clock. The
filter keeps the last 64 samples in a chain of registers. A bus-programmable register file
holds the 64 coefficients. A small sequencer walks a tap index from 0 to 63, and each clock
adds one product `b[k]·x[n-k]` to an accumulator. After 64 clocks the finished sum goes into
the output register.

Default sizes:

| Quantity | Parameter | Default |
|---|---|---|
| taps | `O` | 64 |
| log2 of taps (accumulator guard bits) | `LOG2O` | 6 |
| sample width, signed | `NX` | 8 |
| coefficient width, signed | `NC` | 8 |
| product width | `NY` | 16 (= NX + NC) |
| output width | `NY + LOG2O` | 22 |
| coefficient bus address width | `ADDR_W` | 16 |
| address of b[0] | `COEFF_BASE` | `16'hFFC0` |

## Why 22 output bits never overflow

An 8×8 signed product needs 16 bits. Its largest magnitude is (-128)·(-128) = 16384. Adding
64 such products needs log2(64) = 6 more bits: |sum| ≤ 64·16384 = 2^20. That fits the signed
22-bit range [-2^21, 2^21-1]. So the accumulator and the output are simply 22 bits wide, with
no saturation or rounding. The 6 guard bits are the "saturation margin" of the design. For
other sizes, keep `LOG2O ≥ log2(O)` so the same bound holds. `fir_control` asserts
`O ≤ 2^LOG2O`.

All arithmetic is two's complement. Samples, coefficients and the output are signed.

## Block structure

```
                +-------------------------------------------------+
 x, x_valid --> |  fir_array                                      | --> y (22 b, registered)
 x_ready   <--  |   taps[0..63] --mux--+                          |
                |                      +--> fir_mult --> fir_adder --> acc / y reg
                |   coeffs    --mux--+ |          ^                |
                +-------------^------|-----------|----------------+
                              | O x NC bits      | shift, sel, first, mac_en, y_load
   c_addr, c_wr, c_rd,  +---------------+    +-------------+
   c_wdata -----------> | coeff_storage |    | fir_control | <-- x_valid, zero
   c_rdata, c_ack <---- +---------------+    +-------------+ --> y_valid, busy
```

| Module | Role |
|---|---|
| `fir_top` | Wires the three blocks together and brings out the sample stream and the coefficient bus. |
| `fir_array` | Datapath: input and delay-line registers, two 64:1 multiplexers, the multiplier, the adder, the accumulator and the output register. |
| `coeff_storage` | Register array of 64 coefficients. A host reads and writes it over an address/data bus. It drives all coefficients in parallel to the datapath. |
| `fir_control` | Sequencer: sample handshake, tap counter, first-tap and last-tap strobes, `y_valid`. |
| `fir_mult` | Signed NX×NC → NX+NC multiplier, combinational. |
| `fir_adder` | Signed W-bit adder, combinational. |
| `fir_mux` | N:1 word multiplexer. |
| `fir_dff` | W-bit register with load enable and synchronous clear. It is the building block of every data register in `fir_array`. |
| `fir_pkg` | Default sizes shared by all modules. |

## The multiply-accumulate schedule

This is the part to understand before changing anything. Time runs in clock edges. Edge E₀
is the edge that takes a sample (`x_valid && x_ready`).

| Clock cycle after | `sel` | Strobe | What the edge at the end of the cycle does |
|---|---|---|---|
| E₀ (taking edge) | – | `shift` | `taps[0] ← x`, `taps[k] ← taps[k-1]`; sweep starts |
| E₀ … E₁ | 0 | `first` | `acc ← 0 + b[0]·taps[0]` |
| E₁ … E₂ | 1 | | `acc ← acc + b[1]·taps[1]` |
| … | … | | … |
| E₆₃ … E₆₄ | 63 | `y_load`, `x_ready` | `y ← acc + b[63]·taps[63]` |
| E₆₄ … E₆₅ | – | `y_valid` = 1 | |

- **Latency.** `y` changes, and `y_valid` rises, 64 clocks after the taking edge. `y_valid`
  is a one-clock pulse. `y` then holds its value until the next result or a clear.
- **Throughput.** `x_ready` is high while idle and also on the last tap of a sweep. A sample
  offered at that moment is shifted in on the same edge that finishes the previous sum. The
  last tap reads `taps[63]` before that edge, so the two do not collide. A continuous stream
  therefore gets one output every 64 clocks, and a sample offered at any other time waits
  (stalls).
- The product is not registered. The multiplexers, the multiplier and the adder form one
  combinational path from the tap registers to the accumulator. This is the critical path.
- `fir_array` trusts the sequencer. `first` forces the accumulator input to zero. `y_load`
  only takes effect together with `mac_en`.

## Clearing: `zero` and `rst`

Both are synchronous and active high.

- **`zero`** clears, on the next rising edge, the input register `taps[0]`, the rest of the
  delay line, the accumulator and the output register. It also stops a running sweep, so no
  stale sum can land in `y` after the clear. A sample offered in the same clock is not taken.
  Coefficients are kept.
- **`rst`** does the same, and also clears all coefficients and the bus read register.

## Coefficient bus

A plain strobe bus, synchronous to `clk`:

- **Address map:** `b[i]` is at address `COEFF_BASE + i`, so 64 coefficients occupy
  `FFC0`–`FFFF` by default. No other address is decoded.
- **Write:** hold `c_wr` high for one clock with `c_addr` and `c_wdata`. The word is stored at
  that edge.
- **Read:** hold `c_rd` high for one clock. `c_rdata` holds the word in the next clock.
- **Acknowledge:** `c_ack` is high in the clock after an access that hit the window, and low
  after one that missed. An access that misses changes nothing.
- **Write and read together:** if `c_wr` and `c_rd` are both high, the write is done and the
  read returns the old word.
- **Writes during a sweep:** a write takes effect immediately, even in the middle of a sweep.
  That output then mixes old and new coefficients. Rewrite coefficients while `busy` is low
  if this matters.

## Where this RTL departs from the original description

The original filter was described in VHDL at block level. It gave the filter equation, the
generics (order, log2 of the order, and the input, coefficient and output widths), the 8/8/22-bit
sizes, the single time-multiplexed multiplier and adder, the registered outputs, the bus-accessible
coefficient register array and the `zero` clear. The rest is this design's own choice:

- **Arithmetic and widths.** Signed arithmetic, the tap order (`taps[k]` = x[n-k]) and the
  unregistered product were not specified.
- **Handshake and timing.** The valid/ready handshake, the 64-clock schedule with overlap on
  the last tap, and `zero` stopping a running sweep were not specified.
- **Coefficient bus.** The strobe/acknowledge protocol was not specified. Nor was the reset
  value of the coefficients (zero here).
- **Address map.** The original gave an address table for the first coefficients: b[0] at
  `FFE6`, b[1] at `FFE8`, b[2] at `FFED`, b[3] at `FFEF`. Those addresses do not follow a
  fixed stride. No fixed stride starting at `FFE6` fits 64 coefficients below `FFFF`. This
  design uses a contiguous window instead. The window `FFC0`–`FFFF` contains those addresses,
  but maps them to different coefficients: `FFE6` is b[38] here. If your host software
  expects the original table, change the decode in `coeff_storage`.
- **Link between storage and control.** The original block diagram shows a link between
  coefficient storage and control but does not say what it carries. This design has no such
  link.
- **Synthesis screenshots.** Some cell names in the original screenshots (`y_pipe` adders and
  multipliers) hint at a per-tap pipeline. The written description says the filter is fully
  sequential with one multiplier and one adder, and that is what is built here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_fir_top` | Whole filter at default sizes against a reference model. Checks every output value and its 64-clock latency. |
| `tb_fir_array` | Datapath driven by a testbench sequencer: random, impulse and full-scale (±2^20) sums, hold, clear. |
| `tb_fir_control` | Every sequencer output each clock against a reference. Covers stalls, back-to-back samples, `zero` mid-sweep and random traffic. |
| `tb_coeff_storage` | Random-order writes, read-back, addresses just outside the window, write-with-read, reset. |
| `tb_fir_mult` | All 65536 operand pairs. |
| `tb_fir_adder`, `tb_fir_mux`, `tb_fir_dff` | Corner cases and random values. |

`tb_fir_top` runs at the default parameters and takes about 17 500 clocks. Its stimulus:

1. Loads coefficients over the bus and reads them back.
2. Tries addresses outside the window.
3. Sends an impulse, so the output must replay b[0..63].
4. Sends random samples with gaps.
5. Sends a back-to-back stream. It checks that outputs come exactly 64 clocks apart.
6. Applies `zero` while idle and mid-sweep.
7. Drives the largest positive and most negative sums.

It counts each of these events and fails if one never happened.

## Simulating

Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
          rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
./obj_dir/Vtb_fir_top
```

Replace `tb_fir_top` with any other testbench name to run that test. The RTL is synthesizable
SystemVerilog-2017 with no vendor primitives. To change the filter length or word sizes, set
`O`, `LOG2O`, `NX`, `NC` and `ADDR_W` on `fir_top`. `NY` follows as `NX + NC`, and the output
becomes `NX + NC + LOG2O` bits. Keep the coefficient window inside the address space.
`coeff_storage` checks this at elaboration.
