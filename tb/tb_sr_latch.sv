// tb_sr_latch: checks the level-sensitive set/reset latch.
//
// Walks a fixed sequence and then random input pairs through the latch and
// compares the output with the rule: s high gives 1, r high alone gives 0,
// both low keeps the previous value. Covers the power-up value (0), both
// inputs high (set wins) and holding in both states.
module tb_sr_latch;
  logic s = 1'b0, r = 1'b0;
  logic pwmout;
  int checks = 0, failures = 0;

  sr_latch dut (.s(s), .r(r), .pwmout(pwmout));

  logic ref_q = 1'b0;

  task automatic apply(input logic ns, input logic nr);
    s = ns;
    r = nr;
    if (ns)      ref_q = 1'b1;
    else if (nr) ref_q = 1'b0;
    #1;
    checks++;
    if (pwmout !== ref_q) begin
      failures++;
      $display("FAIL s=%0b r=%0b pwmout=%0b expected %0b at %0t", ns, nr, pwmout, ref_q, $time);
    end
  endtask

  initial begin
    #1;
    checks++;
    if (pwmout !== 1'b0) begin failures++; $display("FAIL power-up value"); end
    apply(0, 0);  // hold 0
    apply(1, 0);  // set
    apply(0, 0);  // hold 1
    apply(0, 1);  // reset
    apply(0, 0);  // hold 0
    apply(1, 1);  // set wins
    apply(0, 0);  // hold 1
    apply(0, 1);
    apply(1, 1);
    apply(0, 1);  // reset after both
    for (int i = 0; i < 200; i++) apply(1'($urandom), 1'($urandom));
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
