// duty_register: N-bit holding register for the duty word.
//
// On a rising clock edge with `load` high it captures `dutyin`; otherwise it
// keeps its value. In the datapath `load` is the counter overflow, so the duty
// word can change only at a PWM period boundary and a period never sees two
// different duty values. Timing: `dutyout` shows the new word from the clock
// after the one in which `load` was high.
//
// No reset pin; the register powers up at zero through its initialiser.
module duty_register #(
  parameter int unsigned N = pwm_pkg::PWM_BITS
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] dutyin,
  output logic [N-1:0] dutyout
);

  logic [N-1:0] duty_q = '0;

  always_ff @(posedge clk)
    if (load) duty_q <= dutyin;

  assign dutyout = duty_q;

endmodule
