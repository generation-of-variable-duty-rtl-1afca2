// tb_pwm_top: end-to-end test of the PWM generator at its default size.
//
// Only the clock is driven. From power-up the output must stay low until the
// first overflow (count 2**N-1, clock 2**N-1); after that, period p starts
// with an overflow clock, lasts 2**N clocks and is high for D+1 of them with
// D = p mod 2**N, because the control unit steps the duty word once per period.
// The expected output is computed from the clock index alone and compared at
// every falling edge over three full sweeps of the duty range.
//
// Mechanisms counted from the output alone (each must occur): counter
// overflows (periods that start high), duty word loads (a period whose high
// time differs from the previous one), latch sets (rising output), latch
// resets by the comparator (falling output), periods with the output held high
// throughout (duty word all ones, set wins), and duty-word wrap-arounds (high
// time dropping from 2**N clocks to one).
module tb_pwm_top;
  localparam int unsigned N = pwm_pkg::PWM_BITS;
  localparam int unsigned PERIOD = 1 << N;
  localparam int unsigned SWEEPS = 3;
  localparam int unsigned CYCLES = PERIOD - 1 + SWEEPS * PERIOD * PERIOD;

  logic clk = 1'b1;  // first edge is a falling one, so checks see the power-up state
  logic pwm;
  int checks = 0, failures = 0;

  pwm_top dut (.clk(clk), .pwm(pwm));

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int n_overflow = 0, n_load_change = 0, n_set = 0, n_reset = 0;
  int n_full_high = 0, n_wrap = 0;
  int high_clocks = 0, prev_high = -1;
  bit prev_pwm = 0;

  initial begin
    for (int t = 0; t < int'(CYCLES); t++) begin
      bit exp;
      int p, o, d;
      @(negedge clk);
      if (t < int'(PERIOD) - 1) begin
        exp = 0;
        p = -1; o = 0; d = 0;
      end else begin
        p = (t - (PERIOD - 1)) / PERIOD;
        o = (t - (PERIOD - 1)) % PERIOD;
        d = p % PERIOD;
        exp = (o <= d);
      end
      check(pwm == exp, $sformatf("clock %0d (period %0d, offset %0d, duty %0d): pwm=%0b",
                                  t, p, o, d, pwm));
      // per-period duty measurement at the last clock of each period
      if (p >= 0) begin
        if (o == 0) begin
          high_clocks = 0;
          if (pwm) n_overflow++;
        end
        if (pwm) high_clocks++;
        if (o == int'(PERIOD) - 1) begin
          check(high_clocks == d + 1, $sformatf("period %0d high for %0d clocks", p, high_clocks));
          if (high_clocks == int'(PERIOD)) n_full_high++;
          if (prev_high >= 0 && high_clocks != prev_high) n_load_change++;
          if (prev_high == int'(PERIOD) && high_clocks == 1) n_wrap++;
          prev_high = high_clocks;
        end
      end
      if (pwm && !prev_pwm) n_set++;
      if (!pwm && prev_pwm) n_reset++;
      prev_pwm = pwm;
    end
    check(n_overflow == int'(SWEEPS * PERIOD), $sformatf("overflows %0d", n_overflow));
    check(n_load_change > 0, "register never loaded a new duty word");
    check(n_set > 0, "latch never set");
    check(n_reset > 0, "latch never reset by the comparator");
    check(n_full_high == int'(SWEEPS), $sformatf("full-high periods %0d", n_full_high));
    check(n_wrap > 0, "duty word never wrapped");
    $display("mechanisms: overflow=%0d register_load=%0d latch_set=%0d latch_reset=%0d full_high=%0d duty_wrap=%0d",
             n_overflow, n_load_change, n_set, n_reset, n_full_high, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
