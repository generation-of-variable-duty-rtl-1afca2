// pwm_pkg: constants shared by the PWM generator.
//
// PWM_BITS is the width N of the duty word, of the period counter and of the
// comparator. With N bits a PWM period lasts 2**N clocks. The value 4 is the
// width of every bus in the published schematics (dutyin(3:0), countout(3:0)).
package pwm_pkg;
  localparam int unsigned PWM_BITS = 4;
endpackage
