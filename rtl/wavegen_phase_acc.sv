// Phase accumulator of the wave generator.
//
// Each rising clock edge adds the signed step `offset` to the PHASE_W-bit
// phase register `sum`, wrapping modulo 2^PHASE_W. A positive step advances
// the phase (rising output frequency with larger steps), zero holds it, and a
// negative step turns the phasor the other way. The table address `addr` is
// a second register loaded with `sum` every cycle, so it trails the
// accumulator by one clock.
//
// Reset is synchronous and active high: it clears `sum`, while `addr` still
// takes the old `sum` on that edge and so reaches zero one edge later. Both
// behaviours follow the original design. Output frequency is
// f_clk * offset / 2^PHASE_W.
//
// Interface: clk, reset (synchronous, high), offset (signed step, sampled
// every edge), addr (registered table address).
module wavegen_phase_acc
  import wavegen_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  step_t  offset,
  output phase_t addr
);

  phase_t sum;
  phase_t step_ext;

  // Sign extension of the step to the accumulator width; the add then wraps.
  assign step_ext = phase_t'(signed'({{(PHASE_W-STEP_W){offset[STEP_W-1]}}, offset}));

  always_ff @(posedge clk) begin
    if (reset) sum <= '0;
    else       sum <= sum + step_ext;
    addr <= sum;
  end

endmodule
