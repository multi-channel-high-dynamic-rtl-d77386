// tb_hpf_swclk_gen: self-checking testbench for hpf_swclk_gen.
// Measures the period and high time of a1 (fast HPF stage, 10 kHz) and a2
// (slow stage, 500 Hz) at the default dividers, checks that no a2 edge lands
// on an a1 edge (the two base signals must be misaligned), and that each
// enable holds its output low.  Watchdog at 20 ms.
`timescale 1ns/1ps
module tb_hpf_swclk_gen;
  localparam int DIV1 = 1200, DIV2 = 24000;
  logic clk = 0, rst_n = 0, en1 = 1, en2 = 1, a1, a2;
  int checks = 0, failures = 0;

  hpf_swclk_gen dut (.*);
  always #41.667 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int cyc = 0, r1 [$], r2 [$], h1 = 0, h2 = 0, coincide = 0;
  bit p1 = 0, p2 = 0;
  always @(posedge clk) if (rst_n && en1 && en2) begin
    cyc++;
    if (a1 && !p1) r1.push_back(cyc);
    if (a2 && !p2) r2.push_back(cyc);
    if ((a1 != p1) && (a2 != p2)) coincide++;
    if (a1) h1++;
    if (a2) h2++;
    p1 = a1; p2 = a2;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (3 * DIV2 + 10) @(posedge clk);
    check(r1.size() >= 3 * DIV2 / DIV1 - 1, $sformatf("a1 edges %0d", r1.size()));
    check(r2.size() >= 3, $sformatf("a2 edges %0d", r2.size()));
    for (int i = 1; i < r1.size(); i++) check(r1[i] - r1[i-1] == DIV1, "a1 period");
    for (int i = 1; i < r2.size(); i++) check(r2[i] - r2[i-1] == DIV2, "a2 period");
    check(h1 > 3 * DIV2 / 2 - DIV1 && h1 < 3 * DIV2 / 2 + DIV1, $sformatf("a1 duty %0d", h1));
    check(h2 > DIV2 && h2 <= 2 * DIV2, $sformatf("a2 duty %0d", h2));
    check(coincide == 0, "a1 and a2 edges coincide");
    // enables
    en1 = 0; en2 = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 2 * DIV1; i++) begin
      @(posedge clk);
      if (a1 || a2) begin check(0, "output active while disabled"); break; end
    end
    check(!a1 && !a2, "outputs low while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
