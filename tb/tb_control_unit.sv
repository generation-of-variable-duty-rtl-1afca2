// tb_control_unit: checks the duty-word source.
//
// Applies random load pulses. The duty word must start at zero, advance by one
// at each clock edge with load high, hold otherwise, and wrap from 2**N-1 to
// 0; the test drives enough pulses to wrap at least twice.
module tb_control_unit;
  localparam int unsigned N = pwm_pkg::PWM_BITS;

  logic         clk = 1'b0;
  logic         load = 1'b0;
  logic [N-1:0] dataout;
  int checks = 0, failures = 0;

  control_unit dut (.clk(clk), .load(load), .dataout(dataout));

  always #5 clk = ~clk;

  int unsigned ref_d = 0;
  int wraps = 0;

  initial begin
    @(negedge clk);
    checks++;
    if (dataout !== '0) begin failures++; $display("FAIL power-up value %0d", dataout); end
    for (int i = 0; i < 300; i++) begin
      load = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (load) begin
        if (ref_d == (1 << N) - 1) wraps++;
        ref_d = (ref_d + 1) % (1 << N);
      end
      @(negedge clk);
      checks++;
      if (dataout !== N'(ref_d)) begin
        failures++;
        $display("FAIL step %0d: dataout %0d expected %0d", i, dataout, ref_d);
      end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL only %0d wraps", wraps); end
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
