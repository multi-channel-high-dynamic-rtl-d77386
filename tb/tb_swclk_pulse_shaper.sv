// tb_swclk_pulse_shaper: self-checking testbench for swclk_pulse_shaper.
// Drives rising and falling edges of A for every delay setting and measures
// the swclk pulse: one pulse of dly_ctrl ns (1 ns for setting 0) per rising
// edge of A, and nothing on a falling edge.  Watchdog at 1 ms.
`timescale 1ns/1ps
module tb_swclk_pulse_shaper;
  logic a = 0, swclk;
  logic [3:0] dly_ctrl = 0;
  int checks = 0, failures = 0;

  swclk_pulse_shaper dut (.*);

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

  realtime t_rise, width;
  int n_pulse = 0;
  always @(posedge swclk) begin t_rise = $realtime; n_pulse++; end
  always @(negedge swclk) width = $realtime - t_rise;

  initial begin
    #50;
    for (int rep = 0; rep < 3; rep++)
      for (int d = 0; d < 16; d++) begin
        int want;
        want = (d == 0) ? 1 : d;
        dly_ctrl = 4'(d);
        #40;
        n_pulse = 0; width = 0;
        a = 1;
        #40;
        check(n_pulse == 1, $sformatf("pulses on rising edge %0d (d=%0d)", n_pulse, d));
        check(width > want - 0.01 && width < want + 0.01, $sformatf("width %0.2f ns for d=%0d", width, d));
        n_pulse = 0;
        a = 0;
        #40;
        check(n_pulse == 0, "pulse on falling edge");
        check(swclk == 0, "swclk stuck high");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
