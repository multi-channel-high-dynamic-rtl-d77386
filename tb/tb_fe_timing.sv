// tb_fe_timing: self-checking testbench for fe_timing.
// Runs the controller at its default 2000-cycle period for several sampling
// periods and checks, per period: the srdy spacing, two count windows of WIN
// cycles each, count_en covering every count-high cycle, the Sp/Sn overlap
// length (OVERLAP cycles twice per period, never both low after start-up),
// and two sample strobes that alternate between the Sp and Sn halves.
// Timing: 12 MHz clock (83.33 ns period); watchdog at 5 ms.
`timescale 1ns/1ps
module tb_fe_timing;
  localparam int PERIOD = 2000, OVERLAP = 2, WIN = 600;
  logic clk = 0, rst_n = 0;
  logic sp, sn, count, count_en, sample_stb, sample_is_p, srdy, frame_tick;
  int checks = 0, failures = 0;

  fe_timing dut (.*);

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

  initial begin
    int last_srdy, cyc, n_cnt, n_rise, n_ovl, n_stb, n_both_low, n_en_miss;
    bit prev_cnt, stb_p [2];
    repeat (5) @(posedge clk);
    rst_n = 1;
    // align on the first srdy
    do @(posedge clk); while (!srdy);
    for (int p = 0; p < 4; p++) begin
      n_cnt = 0; n_rise = 0; n_ovl = 0; n_stb = 0; n_both_low = 0; n_en_miss = 0;
      prev_cnt = count;
      cyc = 0;
      do begin
        @(posedge clk); cyc++;
        if (count) n_cnt++;
        if (count && !prev_cnt) n_rise++;
        prev_cnt = count;
        if (sp && sn) n_ovl++;
        if (!sp && !sn) n_both_low++;
        if (count && !count_en) n_en_miss++;
        if (sample_stb) begin
          if (n_stb < 2) stb_p[n_stb] = sample_is_p;
          n_stb++;
        end
      end while (!srdy);
      check(cyc == PERIOD, $sformatf("srdy spacing %0d", cyc));
      check(n_cnt == 2 * WIN, $sformatf("count high cycles %0d", n_cnt));
      check(n_rise == 2, $sformatf("count windows %0d", n_rise));
      check(n_ovl == 2 * OVERLAP, $sformatf("overlap cycles %0d", n_ovl));
      check(n_both_low == 0, "Sp and Sn both low");
      check(n_en_miss == 0, "count outside count_en");
      check(n_stb == 2, $sformatf("sample strobes %0d", n_stb));
      check(stb_p[0] != stb_p[1], "strobes do not alternate Sp/Sn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
