# Quadrature wave generator (6-bit NCO)

This design is a small numerically controlled oscillator. It turns a signed
3-bit frequency word into two sampled sine waves a quarter period apart: an
in-phase output `w_i = cos(phase)` and a quadrature output
`w_q = cos(phase + 90°) = -sin(phase)`. Together they trace a rotating phasor.
The word sets its speed and direction. This kind of I/Q source is what a
digital mixer or a modulator needs.

It is the textbook direct digital synthesis structure, kept as small as it
can be:

```
            +-----------+      +-----------+      +---------------------+
offset ---->|  + (6 b)  |--+-->|  addr reg |--+-->| cos table [addr]    |--> w_i
 (3 b,      |  sum reg  |  |   |  (6 b)    |  |   |                     |
  signed)   +-----------+  |   +-----------+  +-->| cos table [addr+16] |--> w_q
                 ^---------+                      +---------------------+
```

## Frequency word

`offset` is a two's complement step of -4..+3. It is added to the 6-bit
phase every clock, and the phase wraps modulo 64. One output period therefore
takes 64/|offset| clocks, and the output frequency is
`f_out = offset · f_clk / 64`. A negative step turns the phasor the other
way: `w_i` looks the same, and `w_q` changes sign.

| `offset` code | step | clocks per period | f_out at 100 MHz |
|---|---|---|---|
| 000 | 0 | outputs frozen | 0 |
| 001 | +1 | 64 | 1.5625 MHz |
| 010 | +2 | 32 | 3.125 MHz |
| 011 | +3 | 64/3 (3 periods per 64 clocks) | 4.6875 MHz |
| 100 | -4 | 16 | -6.25 MHz |
| 101 | -3 | 64/3 | -4.6875 MHz |
| 110 | -2 | 32 | -3.125 MHz |
| 111 | -1 | 64 | -1.5625 MHz |

A step of 0 holds the phase, so both outputs stay constant until the step
changes. The phase is never reset by a change of step, so the waveform stays
continuous in phase across frequency changes.

## Sample format and the table

Both outputs are 10-bit two's complement fractions with nine fraction bits.
The real value is `code / 512`, which lies in [-1, +511/512].

The table holds one period of cosine in 64 entries:

    entry(k) = round(512 · cos(2πk/64)),   clamped to +511

Only `k = 0` needs the clamp, since `512` does not fit. A few reference points:
`entry(0) = 511`, `entry(8) = 362` (≈ 512/√2), `entry(16) = 0`,
`entry(32) = -512`. The table is generated by the constant function
`wavegen_pkg::cos_entry` during elaboration. Synthesis sees a 64 × 10 ROM read
at two addresses. The quadrature read uses `addr + 16`, wrapping in six bits,
which is a quarter period ahead.

## Timing and reset

This section needs the most care when the block is connected to other logic.

* **Two registers, one clock apart.** `sum` (the phase) takes `sum + offset`
  on each rising edge. `addr` takes the old `sum` on that same edge. The table
  is combinational after `addr`.
* **Latency of a new step.** If `offset` changes between edges n and n+1,
  edge n+1 adds it to `sum`. Edge n+2 moves it into `addr`, and the outputs
  change after edge n+2. So the outputs lag the accumulator by one clock.
* **Outputs are not registered.** `w_i`/`w_q` settle one ROM access after the
  `addr` edge. A downstream stage that needs clean registered samples should
  register them.
* **Reset is synchronous and active high.** A reset edge clears `sum`.
  `addr` is not cleared. It copies the old `sum` on that edge and holds zero
  from the second reset edge on. Hold `reset` for at least two clocks to get
  `w_i = 511`, `w_q = 0` when it is released.
* The critical path is the 6-bit add from `sum` back to `sum`. With any
  current cell library it is far shorter than the 10 ns clock used in the
  reference test.

## Reference behaviour

The reference test runs a 10 ns clock and holds reset for 30 ns. It then sets
`offset` to 1, 2, 0, 3, 4, 5, 6, 7 for 70 clocks each. After 70 clocks at
+1 and 70 at +2, the phase is (70 + 140) mod 64 = 18. During the step-0 window
the outputs therefore freeze at `w_i = 0x39c` (-100) and `w_q = 0x20a`
(-502), which are `entry(18)` and `entry(34)`. After that the four negative
steps play back with frequency falling from -4 to -1. At the change from +3
to -4, `w_q` reverses direction while `w_i` does not, as expected when the
phasor turns back.

## Files

| File | Contents |
|---|---|
| `rtl/wavegen_pkg.sv` | widths (`PHASE_W = 6`, `STEP_W = 3`, `SAMPLE_W = 10`), types, table formula |
| `rtl/wavegen_phase_acc.sv` | phase accumulator and address register |
| `rtl/wavegen_cos_rom.sv` | dual-read cosine table |
| `rtl/wavegen.sv` | top level: accumulator feeding the table |
| `tb/tb_wavegen_phase_acc.sv` | accumulator against an integer phase model, random steps and resets |
| `tb/tb_wavegen_cos_rom.sv` | every table entry against `$cos`, symmetry and fixed points |
| `tb/tb_wavegen.sv` | whole generator: reference stimulus, then random steps and resets |

The widths are package constants rather than module parameters. Changing
`PHASE_W` or `SAMPLE_W` in `wavegen_pkg` rescales the whole design, table
included. The testbenches assume the default sizes.

## Simulating

Each testbench checks itself. It prints one line
`TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/wavegen_pkg.sv rtl/wavegen_phase_acc.sv \
    rtl/wavegen_cos_rom.sv rtl/wavegen.sv tb/tb_wavegen.sv --top-module tb_wavegen
./obj_dir/Vtb_wavegen
```

For the block tests, use the package, the block's file and its testbench.
`tb_wavegen` runs the design at its only size. It compares both samples with a
real-arithmetic reference every clock, and checks the held pair 0x39c/0x20a,
the two-edge latency and the magnitude `w_i² + w_q² ≈ 512²`. It also counts
resets, forward steps, holds, backward steps, and wraps of the phase in both
directions, and fails if any of these never happened.

## Where this version differs from the original design

* The original is a single entity with two processes. Here the accumulator and
  the table are separate modules, with identical behaviour at the ports.
* Port names are lower case: `clk`, `reset`, `offset`, `w_i`, `w_q`.
* The original gives the 64 table values as literals. Here they come from the
  formula above, which reproduces every one of them.
* The original declares the phase with an initial value of zero. Here the
  phase depends on reset alone, so apply reset before use.
* The step is treated as signed. A port comment in the original calls it
  unsigned, but its adder sign-extends the step. Its waveforms also show the
  frequency falling from code 4 to code 7, which is what steps of -4..-1 give. The adder's reading is followed here.
