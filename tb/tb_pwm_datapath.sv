// tb_pwm_datapath: checks the PWM datapath against a clock-by-clock reference.
//
// dutyin is changed to a random value at random clocks, not only at period
// boundaries, to show that the register takes it only on the overflow edge.
// At each falling edge the testbench compares `load` and `pwmout` with its own
// model (count, held duty word, latch). It also measures every complete
// period: the output must be high for D+1 of the 2**N clocks, where D is the
// word captured at the start of the period, and overflows must be 2**N clocks
// apart. Every duty value, including all ones (constant high), must occur.
module tb_pwm_datapath;
  localparam int unsigned N = pwm_pkg::PWM_BITS;
  localparam int unsigned PERIOD = 1 << N;
  localparam int unsigned NPER = 200;

  logic         clk = 1'b1;  // first edge is a falling one, so checks see the power-up state
  logic [N-1:0] dutyin = '0;
  logic         load, pwmout;
  int checks = 0, failures = 0;

  pwm_datapath dut (.clk(clk), .dutyin(dutyin), .load(load), .pwmout(pwmout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state, all zero at power-up
  int unsigned m_count = 0, m_duty = 0;
  bit m_q = 0;
  bit seen_duty [PERIOD];
  int periods = 0, high_clocks = 0, period_duty = -1, period_len = 0;

  initial begin
    for (int cyc = 0; cyc < NPER * PERIOD; cyc++) begin
      @(negedge clk);
      // reference latch: set by overflow, reset by compare, set wins
      if (m_count == PERIOD - 1) m_q = 1;
      else if (m_count == m_duty) m_q = 0;
      check(load == (m_count == PERIOD - 1), $sformatf("load at count %0d", m_count));
      check(pwmout == m_q, $sformatf("pwmout=%0b expected %0b (count %0d duty %0d)",
                                      pwmout, m_q, m_count, m_duty));
      // change the input at random points of the period
      if ($urandom_range(0, 5) == 0) dutyin = N'($urandom);
      // period measurement: a period runs from one overflow clock to the next
      if (load) begin
        if (period_duty >= 0) begin
          check(period_len == PERIOD, $sformatf("period length %0d", period_len));
          check(high_clocks == period_duty + 1,
                $sformatf("duty %0d: high for %0d clocks, expected %0d",
                          period_duty, high_clocks, period_duty + 1));
          seen_duty[period_duty] = 1;
          periods++;
        end
        period_duty = int'(dutyin);  // captured at the coming edge
        high_clocks = 0;
        period_len  = 0;
      end
      period_len++;
      if (pwmout) high_clocks++;
      // reference register and counter advance at the next rising edge
      if (m_count == PERIOD - 1) m_duty = dutyin;
      m_count = (m_count + 1) % PERIOD;
    end
    for (int d = 0; d < PERIOD; d++)
      check(seen_duty[d], $sformatf("duty value %0d never exercised", d));
    check(periods == NPER - 1, $sformatf("complete periods %0d", periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPER * PERIOD + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
