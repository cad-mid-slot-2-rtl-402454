// Quadrature wave generator (numerically controlled oscillator), top level.
//
// A signed 3-bit frequency word `offset` is added to a 6-bit phase
// accumulator every clock; the registered phase addresses a 64-entry cosine
// table read twice, giving an in-phase sample w_i = cos(phase) and a
// quadrature sample w_q = cos(phase + 90 deg) = -sin(phase). Offsets 1..3
// turn the phasor forward at 1/64, 2/64 and 3/64 of the clock rate, 0 holds
// the current sample pair, and -4..-1 (encodings 4..7) turn it backward at
// 4/64 down to 1/64 of the clock rate.
//
// Interface: clk; reset, synchronous and active high; offset, signed step;
// w_i and w_q, 10-bit two's complement samples with nine fraction bits
// (value = code / 512). Timing: a change of offset first moves the
// accumulator on the next edge and reaches the outputs one edge after that
// (the address register), so outputs lag the accumulator by one clock. The
// table lookup is combinational after the address register. The structure,
// widths and reset behaviour follow the original design; lower-case port
// names and the split into accumulator and table modules are this version's.
module wavegen
  import wavegen_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  step_t   offset,
  output sample_t w_i,
  output sample_t w_q
);

  phase_t addr;

  wavegen_phase_acc u_acc (
    .clk    (clk),
    .reset  (reset),
    .offset (offset),
    .addr   (addr)
  );

  wavegen_cos_rom u_rom (
    .addr (addr),
    .w_i  (w_i),
    .w_q  (w_q)
  );

endmodule
