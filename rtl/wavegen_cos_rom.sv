// Quadrature cosine lookup table of the wave generator.
//
// One table of DEPTH entries holds a full period of cosine (see
// wavegen_pkg::cos_entry for the formula). It is read at two addresses at
// once: the in-phase sample at addr, and the quadrature sample at
// addr + DEPTH/4, wrapping modulo DEPTH. A quarter period ahead gives
// cos(x + 90 deg) = -sin(x), so the pair (w_i, w_q) is a rotating phasor.
//
// Interface: addr is an unsigned table index; w_i and w_q are signed samples
// scaled by 2^-(SAMPLE_W-1). Timing: purely combinational, both outputs follow
// addr in the same cycle, as in the original design. The table is built at
// elaboration from the formula; the original lists its 64 values.
module wavegen_cos_rom
  import wavegen_pkg::*;
(
  input  phase_t  addr,
  output sample_t w_i,
  output sample_t w_q
);

  sample_t table_q [DEPTH];

  // Constant contents, evaluated once at elaboration.
  for (genvar k = 0; k < DEPTH; k++) begin : g_entry
    assign table_q[k] = cos_entry(k);
  end

  phase_t q_addr;

  always_comb begin
    q_addr = addr + phase_t'(QUARTER);   // wraps modulo DEPTH
    w_i    = table_q[addr];
    w_q    = table_q[q_addr];
  end

endmodule
