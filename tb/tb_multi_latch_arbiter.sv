// Testbench for multi_latch_arbiter.  It replays the four scenarios of the
// multi-latching scheme (the counter steps 9 -> 10 while the phase wraps
// 57 -> 0) and checks that the unwrapped phase 58*cnt + phase comes out
// near 580 in every case, then sweeps every position of the counter step
// relative to the three latching edges for both sides of the phase wrap,
// including the step at the counter's wrap-around.
`timescale 1ns/1ps
module tb_multi_latch_arbiter;
  import vco_fe_pkg::*;

  logic [CNT_W-1:0] cnt1, cnt2, cnt3, cnt;
  logic [PH_W-1:0]  phase;
  logic             arbitrated;
  int checks = 0, failures = 0;

  multi_latch_arbiter dut (.cnt1, .cnt2, .cnt3, .phase, .cnt, .arbitrated);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int c1, input int c2, input int c3, input int ph,
                       input int exp_cnt, input logic exp_arb, input string what);
    cnt1 = CNT_W'(c1); cnt2 = CNT_W'(c2); cnt3 = CNT_W'(c3); phase = PH_W'(ph);
    #1;
    checks++;
    if (cnt != CNT_W'(exp_cnt) || arbitrated != exp_arb) begin
      failures++;
      $display("FAIL %s: cnt=%0d arb=%0d expected %0d/%0d", what, cnt, arbitrated, exp_cnt, exp_arb);
    end
  endtask

  initial begin
    // documented scenarios
    apply(9, 9, 10, 56, 9,  1'b1, "scenario a");
    apply(9, 9, 10, 0,  10, 1'b1, "scenario b");
    apply(9, 5, 10, 0,  10, 1'b1, "scenario c");   // cnt2 caught mid-transition
    apply(9, 10, 10, 57, 9, 1'b1, "scenario d");
    apply(9, 9, 9, 30,  9,  1'b0, "no transition");
    // scenario b with cnt3 caught mid-transition: cnt1+1 must be used
    apply(9, 9, 3, 1,   10, 1'b1, "scenario b, corrupt cnt3");

    // sweep: counter steps from base to base+1 somewhere around the edges
    for (int base = 0; base < (1 << CNT_W); base += 173) begin
      for (int pos = 0; pos < 4; pos++) begin
        int c [3];
        for (int e = 0; e < 3; e++) c[e] = (e >= pos) ? (base + 1) % (1 << CNT_W) : base;
        // phase path latched after the step: wrapped, small phase
        apply(c[0], c[1], c[2], 2,  (pos <= 2) ? (base + 1) % (1 << CNT_W)
                                               : base, (pos > 0 && pos < 3), "sweep wrapped");
        // phase path latched before the step: not wrapped, large phase
        apply(c[0], c[1], c[2], 55, (pos == 0) ? (base + 1) % (1 << CNT_W)
                                               : base, (pos > 0 && pos < 3), "sweep not wrapped");
      end
    end
    // counter wrap-around
    apply((1 << CNT_W) - 1, (1 << CNT_W) - 1, 0, 0, 0, 1'b1, "wrap");
    apply((1 << CNT_W) - 1, 0, 0, 57, (1 << CNT_W) - 1, 1'b1, "wrap not wrapped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
