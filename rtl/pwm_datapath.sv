// pwm_datapath: turns an N-bit duty word into a fixed-frequency PWM output.
//
// A free-running N-bit counter sets the period of 2**N clocks. In the last
// clock of each period (count all ones) the counter's overflow `load`
//   - sets the output latch, starting the high part of the period, and
//   - enables the duty register, which takes `dutyin` at the edge where the
//     count wraps to 0.
// The comparator then watches for the count to equal the held duty word D;
// in that clock it resets the latch, ending the high part.
//
// The output is therefore high from the overflow clock through count D-1 and
// low from count D through count 2**N-2: D+1 high clocks out of 2**N. A duty
// word of all ones keeps the output high (set wins over reset in the latch).
// The PWM frequency is f_clk / 2**N for every duty value.
//
// Wiring follows the datapath schematic exactly: register output to
// comparator data1, counter output to data2, comparator output to the latch's
// reset, counter overflow to the latch's set, the register's load and the
// `load` output.
module pwm_datapath #(
  parameter int unsigned N = pwm_pkg::PWM_BITS
) (
  input  logic         clk,
  input  logic [N-1:0] dutyin,
  output logic         load,
  output logic         pwmout
);

  logic [N-1:0] dutyout;
  logic [N-1:0] countout;
  logic         eqout;

  duty_register #(.N(N)) u_register (
    .clk     (clk),
    .load    (load),
    .dutyin  (dutyin),
    .dutyout (dutyout)
  );

  pwm_counter #(.N(N)) u_counter (
    .clk      (clk),
    .countout (countout),
    .load     (load)
  );

  duty_comparator #(.N(N)) u_comparator (
    .data1 (dutyout),
    .data2 (countout),
    .eqout (eqout)
  );

  sr_latch u_latch (
    .s      (load),
    .r      (eqout),
    .pwmout (pwmout)
  );

endmodule
