// Self-checking test of the phase accumulator.
//
// Drives random signed steps, with occasional synchronous resets, and
// compares the registered table address each cycle with a reference that
// keeps its own phase count as an integer modulo 64 and delays it by one
// clock. Also checks the reset timing (the address is zero on the second
// edge of a reset), that a zero step holds the phase, and that a step of s
// returns to the start after 64/|s| cycles for s = 1, 2, -4, -1.
module tb_wavegen_phase_acc;
  import wavegen_pkg::*;

  logic   clk;
  logic   reset;
  step_t  offset;
  phase_t addr;
  int     checks   = 0;
  int     failures = 0;
  int     ref_sum  = 0;   // integer model of the accumulator, 0..63
  int     ref_addr = 0;

  wavegen_phase_acc dut (.clk(clk), .reset(reset), .offset(offset), .addr(addr));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // One clock: apply inputs after the falling edge, update the model on the
  // rising edge, compare just after it.
  task automatic step(logic r, int s);
    @(negedge clk);
    reset  = r;
    offset = step_t'(s);
    @(posedge clk);
    ref_addr       = ref_sum;
    if (r) ref_sum = 0;
    else   ref_sum = ((ref_sum + s) % 64 + 64) % 64;
    #1;
    check("addr", int'(addr), ref_addr);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    int s;
    reset  = 1'b1;
    offset = '0;
    // Two reset edges: the first clears the accumulator, the second the address.
    @(posedge clk);
    ref_sum = 0;
    @(posedge clk);
    #1;
    check("addr after reset", int'(addr), 0);
    ref_addr = 0;

    // Hold with a zero step.
    repeat (5) step(1'b0, 0);

    // Full periods at several steps: the address comes back to its start.
    foreach (s_list[i]) begin
      s = s_list[i];
      step(1'b0, s);               // first edge with the new step
      start = int'(addr);
      for (int n = 1; n < 64 / (s < 0 ? -s : s); n++) step(1'b0, s);
      step(1'b0, s);
      checks++;
      if (int'(addr) != start) begin
        failures++;
        $display("FAIL period for step %0d: start %0d now %0d", s, start, addr);
      end
    end

    // Random steps with occasional resets.
    for (int n = 0; n < 2000; n++)
      step(($urandom % 50) == 0, int'($signed(3'($urandom))));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int s_list [4] = '{1, 2, -4, -1};
endmodule
