// tb_nlc_horner: self-checking testbench for nlc_horner.
// A bit-exact reference of the Horner recursion (acc <- sat24(a_k +
// (x*acc >>> 15)), k = 5..0, y = sat16(acc)) runs in 64-bit integers next
// to the engine.  Cases: unity coefficients (y == x), a pure cubic, random
// small coefficients, large coefficients that drive the saturation paths,
// and back-to-back starts.  Also checks that done rises a fixed number of
// clocks after start and that busy covers the whole computation.
// 12 MHz clock; watchdog at 2 ms.
`timescale 1ns/1ps
module tb_nlc_horner;
  import vco_fe_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  sample_t x = 0, y;
  coef_t   coef [NLC_ORDER+1];
  int checks = 0, failures = 0, n_sat = 0;

  nlc_horner dut (.*);
  always #41.667 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic longint sat(longint v, int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction

  function automatic longint ref_y(longint xv);
    longint acc = 0;
    for (int k = NLC_ORDER; k >= 0; k--)
      acc = sat(longint'(coef[k]) + ((xv * acc) >>> COEF_FRAC), ACC_W);
    return sat(acc, SAMPLE_W);
  endfunction

  task automatic run_one(sample_t xv);
    int lat = 0;
    longint want;
    @(negedge clk);
    x = xv; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      check(busy || done, "busy dropped early");
      @(negedge clk); lat++;
    end
    want = ref_y(longint'(xv));
    if (want == 32767 || want == -32768) n_sat++;
    check(lat == 7, $sformatf("latency %0d", lat));
    check(longint'(y) == want, $sformatf("x=%0d y=%0d want %0d", xv, y, want));
  endtask

  initial begin
    foreach (coef[k]) coef[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // unity
    coef[1] = 18'sd32768;
    for (int i = 0; i < 20; i++) begin
      sample_t xv;
      xv = sample_t'($urandom);
      run_one(xv);
      check(y == xv, "unity gain");
    end
    // pure cubic, a0 offset
    foreach (coef[k]) coef[k] = 0;
    coef[0] = 18'sd100; coef[1] = 18'sd32768; coef[3] = -18'sd4000;
    for (int i = 0; i < 30; i++) run_one(sample_t'($urandom));
    // random small coefficients
    for (int r = 0; r < 20; r++) begin
      foreach (coef[k]) coef[k] = coef_t'($signed($urandom_range(0, 16000)) - 8000);
      coef[1] = coef_t'(32768 + $signed($urandom_range(0, 2000)) - 1000);
      for (int i = 0; i < 10; i++) run_one(sample_t'($urandom));
    end
    // large coefficients: saturation
    for (int r = 0; r < 20; r++) begin
      foreach (coef[k]) coef[k] = coef_t'($urandom);
      for (int i = 0; i < 10; i++) run_one(sample_t'($urandom));
    end
    check(n_sat > 0, "saturation never exercised");
    $display("saturated results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
