// Self-checking test of the quadrature cosine table.
//
// Sweeps every address and checks, for each one:
//   - w_i against 512*cos(2*pi*k/64), worked out here in real arithmetic,
//     to within half a code (rounding) and clamped to +511;
//   - w_q against the same reference a quarter period later, which is
//     -512*sin(2*pi*k/64);
//   - the even symmetry of cosine, w_i(k) = w_i(64-k);
//   - a few exact codes: +511 at 0, 0 at 16 and 48, -512 at 32, and the
//     pair 0x39c/0x20a (-100/-502) that the generator shows when held at
//     phase 18.
// The table is combinational, so each address is applied and read after a
// short settling delay. A watchdog ends the run if it stalls.
module tb_wavegen_cos_rom;
  import wavegen_pkg::*;

  phase_t  addr;
  sample_t w_i, w_q;
  int      checks   = 0;
  int      failures = 0;
  sample_t seen_i [64];

  wavegen_cos_rom dut (.addr(addr), .w_i(w_i), .w_q(w_q));

  localparam real TWO_PI = 6.28318530717958647692;

  function automatic int ref_code(int k);
    real v;
    int  r;
    v = 512.0 * $cos(TWO_PI * real'(k % 64) / 64.0);
    r = int'($floor(v + 0.5));
    if (r > 511) r = 511;
    return r;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      addr = phase_t'(k);
      #1;
      seen_i[k] = w_i;
      check($sformatf("w_i[%0d]", k), int'(w_i), ref_code(k));
      check($sformatf("w_q[%0d]", k), int'(w_q), ref_code(k + 16));
    end
    for (int k = 1; k < 64; k++)
      check($sformatf("symmetry %0d", k), int'(seen_i[k]), int'(seen_i[64 - k]));
    check("cos(0)",   int'(seen_i[0]),  511);
    check("cos(16)",  int'(seen_i[16]), 0);
    check("cos(32)",  int'(seen_i[32]), -512);
    check("cos(48)",  int'(seen_i[48]), 0);
    addr = 6'd18;
    #1;
    check("held pair I", int'($unsigned(w_i)), 'h39c);
    check("held pair Q", int'($unsigned(w_q)), 'h20a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
