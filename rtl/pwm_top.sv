// pwm_top: variable duty cycle PWM generator.
//
// Two units, as in the top-level schematic. The control unit supplies an N-bit
// duty word; the datapath compares it with a free-running period counter and
// drives the PWM output through a set/reset latch. The datapath's `load` pulse
// (counter overflow, one clock per period) goes back to the control unit,
// which steps the duty word by one per period, so the output sweeps through
// all 2**N duty values: the period holding duty word D is high for D+1 of its
// 2**N clocks.
//
// Interface: just `clk` and `pwm`, the two I/O pins of the original
// implementation. PWM frequency is f_clk / 2**N (f_clk of 5 to 10 MHz gives
// 312.5 to 625 kHz at N = 4). There is no reset pin: all state powers up at
// zero, and the first full period starts after the first overflow.
module pwm_top #(
  parameter int unsigned N = pwm_pkg::PWM_BITS
) (
  input  logic clk,
  output logic pwm
);

  logic [N-1:0] duty;
  logic         load;

  control_unit #(.N(N)) u_control (
    .clk     (clk),
    .load    (load),
    .dataout (duty)
  );

  pwm_datapath #(.N(N)) u_datapath (
    .clk    (clk),
    .dutyin (duty),
    .load   (load),
    .pwmout (pwm)
  );

endmodule
