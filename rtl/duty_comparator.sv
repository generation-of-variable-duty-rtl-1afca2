// duty_comparator: N-bit equality comparator.
//
// `eqout` is 1 while `data1` (the held duty word) equals `data2` (the period
// count) and 0 otherwise. Purely combinational, with no clock, as the block is
// drawn. In the datapath it is high for one clock per period, the clock in
// which the count reaches the duty word, and that pulse resets the output latch.
module duty_comparator #(
  parameter int unsigned N = pwm_pkg::PWM_BITS
) (
  input  logic [N-1:0] data1,
  input  logic [N-1:0] data2,
  output logic         eqout
);

  assign eqout = (data1 == data2);

endmodule
