// tb_duty_comparator: exhaustive check of the N-bit equality comparator.
//
// Applies every pair of N-bit inputs and compares eqout with data1 == data2.
// Also counts the equal and unequal cases seen, which must be 2**N and
// 2**N * (2**N - 1).
module tb_duty_comparator;
  localparam int unsigned N = pwm_pkg::PWM_BITS;

  logic [N-1:0] data1, data2;
  logic         eqout;
  int checks = 0, failures = 0;
  int equal_seen = 0, unequal_seen = 0;

  duty_comparator dut (.data1(data1), .data2(data2), .eqout(eqout));

  initial begin
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++) begin
        data1 = N'(a);
        data2 = N'(b);
        #1;
        checks++;
        if (eqout !== (a == b)) begin
          failures++;
          $display("FAIL data1=%0d data2=%0d eqout=%0b", a, b, eqout);
        end
        if (eqout) equal_seen++; else unequal_seen++;
      end
    checks++;
    if (equal_seen != (1 << N) || unequal_seen != (1 << N) * ((1 << N) - 1)) begin
      failures++;
      $display("FAIL equal=%0d unequal=%0d", equal_seen, unequal_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
