// tb_nlc_interleaved: self-checking testbench for nlc_interleaved at its
// default size (32 channels, 2 engines).  For each frame it loads random
// front-end and external samples, starts the block in one of three modes
// (NLC on front-end data, NLC on external data, bypass) and compares every
// output channel with a bit-exact Horner reference.  It also checks that
// done comes well inside one 2000-cycle sampling period, that a start
// while busy is ignored, and that every mode was exercised.
// 12 MHz clock; watchdog at 5 ms.
`timescale 1ns/1ps
module tb_nlc_interleaved;
  import vco_fe_pkg::*;
  localparam int NCH = 32;
  logic clk = 0, rst_n = 0, start = 0, bypass = 0, use_ext = 0, done, busy;
  sample_t x_fe [NCH], x_ext [NCH], y [NCH];
  coef_t   coef [NLC_ORDER+1];
  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};

  nlc_interleaved dut (.*);
  always #41.667 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms;
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

  initial begin
    int mode, cyc;
    sample_t xin [NCH];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      mode = f % 3;
      foreach (coef[k]) coef[k] = coef_t'($signed($urandom_range(0, 8000)) - 4000);
      coef[1] = coef_t'(32768 + $signed($urandom_range(0, 4000)) - 2000);
      for (int c = 0; c < NCH; c++) begin
        x_fe[c]  = sample_t'($urandom);
        x_ext[c] = sample_t'($urandom);
      end
      @(negedge clk);
      bypass = (mode == 2); use_ext = (mode == 1);
      start = 1;
      @(negedge clk);
      start = 0;
      xin = use_ext ? x_ext : x_fe;
      // disturb inputs and try a second start while busy
      for (int c = 0; c < NCH; c++) begin x_fe[c] = 0; x_ext[c] = 0; end
      if (busy) begin start = 1; @(negedge clk); start = 0; end
      cyc = 0;
      while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
      check(done, "done missing");
      check(cyc < 400, $sformatf("frame took %0d cycles", cyc));
      for (int c = 0; c < NCH; c++) begin
        longint want;
        want = (mode == 2) ? longint'(xin[c]) : ref_y(longint'(xin[c]));
        check(longint'(y[c]) == want, $sformatf("mode %0d ch %0d y=%0d want %0d", mode, c, y[c], want));
      end
      n_mode[mode]++;
      @(negedge clk);
      check(!busy && !done, "busy/done after frame");
    end
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "a mode never ran");
    $display("frames: nlc=%0d ext=%0d bypass=%0d", n_mode[0], n_mode[1], n_mode[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
