// tb_duty_register: checks the load-enabled duty register.
//
// Drives random duty words and random load pulses. The register must take the
// word only at a clock edge with load high and hold it otherwise; its output
// is compared after each edge with a reference copy, starting from the
// power-up value of zero.
module tb_duty_register;
  localparam int unsigned N = pwm_pkg::PWM_BITS;

  logic         clk = 1'b0;
  logic         load = 1'b0;
  logic [N-1:0] dutyin = '0;
  logic [N-1:0] dutyout;
  int checks = 0, failures = 0;

  duty_register dut (.clk(clk), .load(load), .dutyin(dutyin), .dutyout(dutyout));

  always #5 clk = ~clk;

  logic [N-1:0] ref_q = '0;
  int loads = 0, holds = 0;

  initial begin
    @(negedge clk);
    checks++;
    if (dutyout !== '0) begin failures++; $display("FAIL power-up value %0d", dutyout); end
    for (int i = 0; i < 400; i++) begin
      load   = ($urandom_range(0, 3) == 0);
      dutyin = N'($urandom);
      @(posedge clk);
      if (load) begin ref_q = dutyin; loads++; end
      else holds++;
      @(negedge clk);
      checks++;
      if (dutyout !== ref_q) begin
        failures++;
        $display("FAIL step %0d: dutyout %0d expected %0d (load=%0b)", i, dutyout, ref_q, load);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL loads=%0d holds=%0d", loads, holds); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
