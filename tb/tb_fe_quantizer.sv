// tb_fe_quantizer: self-checking testbench for one front-end channel.
// The timing controller, the Count delay line, the behavioural VCO and the
// quantizer run together at the default 2000-cycle sampling period.  The
// input is held for each sampling period and then changed to a new value
// (random, plus the +/-50 mV ends).  The expected output is the chopped
// phase difference over the two 50 us Count windows:
//   58 * 2 * K * g(v) * T_win,  g(v) = v - A3 v^3,  K = 70 MHz/V,
// about 406000 codes/V, so +/-50 mV gives about +/-20000 codes (a span of
// about 40600).  The result must match within 4 codes plus 0.05 % (the
// model rounds each inverter delay to 1 ps); the ring mismatch
// cancels through the chopping.  Watchdog at 40 ms.
`timescale 1ns/1ps
module tb_fe_quantizer;
  import vco_fe_pkg::*;
  localparam real K = 70.0e6, A3 = 8.0, TWIN = 600 * 83.333e-9;
  logic clk = 0, rst_n = 0;
  logic sp, sn, count, count_en, sample_stb, sample_is_p, srdy, frame_tick;
  logic count1, count_ph, count2, count3;
  logic signed [31:0] vin_uv = 0;
  logic [N_STAGES-1:0] ro_buf_a, ro_buf_b;
  sample_t sample_out;
  logic valid, arb_event, ph_valid;
  int checks = 0, failures = 0, n_arb = 0;

  fe_timing        u_t (.*);
  count_delay_line u_d (.count_in(count), .*);
  vco_model        u_v (.*);
  fe_quantizer     dut (.count(count_ph), .*);

  always #41.667 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #40ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int vnext, vcur;
    real v, want, tol;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // first result covers a half-started period: skip it
    @(posedge clk iff valid);
    vcur = 0;
    for (int i = 0; i < 60; i++) begin
      @(posedge clk iff valid);
      v = vcur * 1.0e-6;
      want = 58.0 * 2.0 * K * (v - A3 * v * v * v) * TWIN;
      if (arb_event) n_arb++;
      check(ph_valid, "phase decode invalid");
      tol = 4.0 + 0.0005 * (want < 0 ? -want : want);
      check(real'(sample_out) > want - tol && real'(sample_out) < want + tol,
            $sformatf("v=%0d uV out=%0d want %0.1f", vcur, sample_out, want));
      vnext = (i == 5) ? 50000 : (i == 6) ? -50000 : $signed($urandom_range(0, 120000)) - 60000;
      @(negedge clk);
      vin_uv = vnext;
      vcur = vnext;
    end
    $display("samples with arbitration: %0d", n_arb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
