// tb_pwm_counter: checks the free-running period counter.
//
// From its power-up value of zero the count must step by one per clock and
// wrap after 2**N clocks; `load` must be high exactly in the clocks where the
// count is all ones, i.e. once every 2**N clocks. Outputs are compared at the
// falling edge with a reference count kept by the testbench.
module tb_pwm_counter;
  localparam int unsigned N = pwm_pkg::PWM_BITS;
  localparam int unsigned PERIOD = 1 << N;

  logic         clk = 1'b1;  // first edge is a falling one, so checks see the power-up state
  logic [N-1:0] countout;
  logic         load;
  int checks = 0, failures = 0;

  pwm_counter dut (.clk(clk), .countout(countout), .load(load));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int unsigned ref_count = 0;
  int last_load = -1;
  int loads = 0;

  initial begin
    for (int cyc = 0; cyc < 5 * PERIOD; cyc++) begin
      @(negedge clk);
      check(countout == N'(ref_count), $sformatf("count %0d expected %0d", countout, ref_count));
      check(load == (ref_count == PERIOD - 1), "load flag");
      if (load) begin
        if (last_load >= 0)
          check(cyc - last_load == PERIOD, $sformatf("overflow spacing %0d", cyc - last_load));
        last_load = cyc;
        loads++;
      end
      ref_count = (ref_count + 1) % PERIOD;
    end
    check(loads == 5, $sformatf("overflows seen %0d", loads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
