// sr_latch: level-sensitive set/reset latch that holds the PWM output.
//
// While `s` is high the output is 1, while only `r` is high it is 0, and with
// both low it keeps its value. Set wins when both are high: in the datapath
// that happens only when the duty word is all ones, and the output then stays
// high for the whole period (100 % duty).
//
// The latch has no clock, as the block is drawn with only r, s and the output.
// It is a real latch, so synthesis reports one; that is intended. Its inputs
// come from decodes of the period counter, which in hardware can glitch while
// several counter bits change at once; a build that must be glitch-free would
// sample s and r with the counter clock instead. The output powers up at 0.
module sr_latch (
  input  logic s,
  input  logic r,
  output logic pwmout
);

  logic q = 1'b0;

  always_latch
    if (s)      q = 1'b1;
    else if (r) q = 1'b0;

  assign pwmout = q;

endmodule
