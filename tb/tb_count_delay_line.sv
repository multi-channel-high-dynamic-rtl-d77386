// tb_count_delay_line: self-checking testbench for count_delay_line.
// Toggles Count at random intervals and checks that each output follows it
// with its fixed delay (count1 0.5 ns, count_ph 1.5 ns, count2 1.8 ns,
// count3 2.5 ns at the defaults), so count1 leads and count3 lags the
// phase-latching edge, on both edges.  Watchdog at 1 ms.
`timescale 1ns/1ps
module tb_count_delay_line;
  logic count_in = 0, count1, count_ph, count2, count3;
  int checks = 0, failures = 0;

  count_delay_line dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  realtime t0, d1, dph, d2, d3;

  always @(posedge count1 or negedge count1) d1 = $realtime - t0;
  always @(posedge count_ph or negedge count_ph) dph = $realtime - t0;
  always @(posedge count2 or negedge count2) d2 = $realtime - t0;
  always @(posedge count3 or negedge count3) d3 = $realtime - t0;

  function automatic bit near(realtime a, realtime b);
    return a > b - 0.01 && a < b + 0.01;
  endfunction

  initial begin
    #10;
    for (int i = 0; i < 100; i++) begin
      t0 = $realtime;
      count_in = ~count_in;
      #(5 + $urandom_range(0, 50));
      check(near(d1, 0.5), $sformatf("count1 delay %0.2f", d1));
      check(near(dph, 1.5), $sformatf("count_ph delay %0.2f", dph));
      check(near(d2, 1.8), $sformatf("count2 delay %0.2f", d2));
      check(near(d3, 2.5), $sformatf("count3 delay %0.2f", d3));
      check(count1 == count_in && count3 == count_in, "outputs settle to count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
