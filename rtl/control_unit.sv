// control_unit: source of the duty word, one new value per PWM period.
//
// An N-bit up-counter that advances by one on each rising clock edge at which
// `load` (the datapath's counter overflow) is high, wrapping from 2**N-1 to 0.
// `dataout` therefore sweeps through every duty value, one per PWM period,
// which shows the generator's whole duty range on the output. Because it
// advances on the same edge at which the datapath register captures `dataout`,
// the register receives the value held before the step: 0, 1, 2, ... in
// successive periods.
//
// The block, its ports and the feedback of `load` into it are given; its
// stepping rule (+1 per period) is this design's choice. No reset pin; the
// counter powers up at zero through its initialiser.
module control_unit #(
  parameter int unsigned N = pwm_pkg::PWM_BITS
) (
  input  logic         clk,
  input  logic         load,
  output logic [N-1:0] dataout
);

  logic [N-1:0] duty = '0;

  always_ff @(posedge clk)
    if (load) duty <= duty + 1'b1;

  assign dataout = duty;

endmodule
