// Shared widths, types and the cosine table for the quadrature wave generator.
//
// The generator is a small direct digital synthesizer: a 6-bit phase
// accumulator steps through a 64-point cosine table by a signed 3-bit step
// each clock. The table holds one full period of cos(), 10-bit two's
// complement with nine fraction bits, so a sample s means s/512.
//
// Entry k is round(512 * cos(2*pi*k/64)), saturated to +511 where the
// rounded value (512 at k = 0) does not fit. This is the rule the table of
// the original design follows entry for entry; here it is computed at
// elaboration time instead of being written out.
package wavegen_pkg;

  localparam int unsigned PHASE_W  = 6;              // accumulator / table address bits
  localparam int unsigned STEP_W   = 3;              // signed phase step bits
  localparam int unsigned SAMPLE_W = 10;             // output sample bits
  localparam int unsigned DEPTH    = 1 << PHASE_W;   // table entries per period
  localparam int unsigned QUARTER  = DEPTH / 4;      // 90 degree phase offset

  typedef logic        [PHASE_W-1:0]  phase_t;
  typedef logic signed [STEP_W-1:0]   step_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  localparam real PI = 3.14159265358979323846;

  // Table entry k: round(2^(SAMPLE_W-1) * cos(2*pi*k/DEPTH)), clamped to the
  // sample range.
  function automatic sample_t cos_entry(int k);
    real    scale;
    real    v;
    int     r;
    int     max_s;
    int     min_s;
    scale = real'(1 << (SAMPLE_W - 1));
    v     = scale * $cos(2.0 * PI * real'(k) / real'(DEPTH));
    r     = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    max_s = (1 << (SAMPLE_W - 1)) - 1;
    min_s = -(1 << (SAMPLE_W - 1));
    if (r > max_s) r = max_s;
    if (r < min_s) r = min_s;
    return sample_t'(r);
  endfunction

endpackage
