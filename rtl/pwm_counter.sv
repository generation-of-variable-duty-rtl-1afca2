// pwm_counter: N-bit free-running synchronous up-counter that sets the PWM
// period.
//
// The count steps by one on every rising clock edge and wraps from 2**N-1 to 0,
// so one PWM period is 2**N clocks. `load` is the overflow flag: a
// combinational decode that is high for exactly the clock in which the count
// is all ones. The edge that ends that clock both wraps the counter and, in the
// datapath, loads the next duty word and sets the output latch.
//
// There is no reset pin (none is drawn for this block); the count powers up at
// zero through the declaration initialiser, as FPGA configuration does. Since
// the counter is free running, any start value is a valid state.
module pwm_counter #(
  parameter int unsigned N = pwm_pkg::PWM_BITS
) (
  input  logic         clk,
  output logic [N-1:0] countout,
  output logic         load
);

  logic [N-1:0] count = '0;

  always_ff @(posedge clk)
    count <= count + 1'b1;

  assign countout = count;
  assign load     = &count;

  // After an overflow clock the count must have wrapped to zero.
  a_wrap : assert property (@(posedge clk) load |=> (count == '0));

endmodule
