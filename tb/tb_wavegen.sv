// End-to-end test of the quadrature wave generator at its default size.
//
// Replays the reference stimulus of the design: 10 ns clock, reset held for
// the first 30 ns, then the step word set to 1, 2, 0, 3, 4, 5, 6, 7 for
// 700 ns (70 clocks) each. A second pass adds random steps and resets.
// Every cycle the two samples are compared with a reference that keeps the
// phase as an integer modulo 64, delays it one clock for the address
// register, and evaluates round(512*cos) and round(512*cos(x + 90 deg)) in
// real arithmetic (clamped to +511).
//
// Also checked:
//   - after 70 clocks at step 1 and 70 at step 2 the phase is 210 mod 64 =
//     18, so the held outputs during the step-0 window are 0x39c and 0x20a;
//   - the two samples stay a quarter turn apart: w_i^2 + w_q^2 is within a
//     few codes of 512^2;
//   - latency: a new step first shows at the outputs on the second edge.
// Each mechanism of the design is counted and must occur: reset, forward
// step, hold, backward step, forward wrap of the phase and backward wrap.
module tb_wavegen;
  import wavegen_pkg::*;

  logic    clk;
  logic    reset;
  step_t   offset;
  sample_t w_i, w_q;

  int checks   = 0;
  int failures = 0;
  int ref_sum  = 0;
  int ref_addr = 0;

  int n_reset = 0, n_fwd = 0, n_hold = 0, n_back = 0, n_wrap_fwd = 0, n_wrap_back = 0;

  wavegen dut (.clk(clk), .reset(reset), .offset(offset), .w_i(w_i), .w_q(w_q));

  initial clk = 1'b0;
  always #5 clk = ~clk;

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
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Model update on each rising edge, with the inputs that edge samples.
  always @(posedge clk) begin
    int next;
    ref_addr <= ref_sum;
    if (reset) begin
      next = 0;
      n_reset++;
    end else begin
      next = ref_sum + int'(offset);
      if (offset > 0) n_fwd++;
      else if (offset < 0) n_back++;
      else n_hold++;
      if (next > 63) n_wrap_fwd++;
      if (next < 0)  n_wrap_back++;
      next = ((next % 64) + 64) % 64;
    end
    ref_sum <= next;
  end

  // Compare in the middle of the high phase, when everything has settled.
  // The address register is not reset, so checking starts after two edges.
  bit armed = 1'b0;
  always @(negedge clk) begin
    if (armed) begin
      int mag2;
      check("w_i", int'(w_i), ref_code(ref_addr));
      check("w_q", int'(w_q), ref_code(ref_addr + 16));
      mag2 = int'(w_i) * int'(w_i) + int'(w_q) * int'(w_q);
      checks++;
      if (mag2 < 511 * 511 - 1024 || mag2 > 512 * 512 + 1024) begin
        failures++;
        $display("FAIL magnitude %0d at %0t", mag2, $time);
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int steps [8] = '{1, 2, 0, 3, 4, 5, 6, 7};

  initial begin
    int held_p;
    reset  = 1'b1;
    offset = 3'b001;
    #30;
    reset = 1'b0;
    armed = 1'b1;
    foreach (steps[j]) begin
      offset = step_t'(steps[j]);
      if (steps[j] == 0) begin
        // Window of the held phase: check the exact pair mid-window.
        #350;
        check("held w_i code", int'($unsigned(w_i)), 'h39c);
        check("held w_q code", int'($unsigned(w_q)), 'h20a);
        #350;
      end else begin
        #700;
      end
    end

    // Latency: from a held phase p, a step of 3 leaves the outputs at p on
    // the first edge and moves them to p + 3 on the second.
    @(negedge clk);
    offset = '0;
    repeat (3) @(negedge clk);
    held_p = ref_addr;
    offset = 3'd3;
    @(negedge clk);
    check("latency, first edge",  int'(w_i), ref_code(held_p));
    @(negedge clk);
    check("latency, second edge", int'(w_i), ref_code(held_p + 3));
    check("latency, second edge q", int'(w_q), ref_code(held_p + 3 + 16));

    // Random steps and resets.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      offset = step_t'($urandom);
      reset  = ($urandom % 100) == 0;
    end
    @(negedge clk);
    reset = 1'b0;
    repeat (2) @(negedge clk);

    checks++;
    if (n_reset == 0 || n_fwd == 0 || n_hold == 0 || n_back == 0 ||
        n_wrap_fwd == 0 || n_wrap_back == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: reset=%0d forward=%0d hold=%0d backward=%0d wrap_fwd=%0d wrap_back=%0d",
             n_reset, n_fwd, n_hold, n_back, n_wrap_fwd, n_wrap_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
