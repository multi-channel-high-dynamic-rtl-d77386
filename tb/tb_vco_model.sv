// tb_vco_model: self-checking testbench for the behavioural VCO model.
// For several input voltages and each chopper phase it counts rising edges
// of the last stage of both rings over 200 us and compares the measured
// frequencies with F0 +/- K*g(v)/2 (g(v) = v - A3 v^3, K = 70 MHz/V), the
// sign following Sp/Sn and both rings equal during the overlap.  It also
// checks that every ring state has exactly one active inverter.
// Watchdog at 20 ms.
`timescale 1ns/1ps
module tb_vco_model;
  localparam real F0 = 5.0, K = 70.0, A3 = 8.0, MM = 0.05;
  logic signed [31:0] vin_uv = 0;
  logic sp = 1, sn = 0;
  logic [28:0] ro_buf_a, ro_buf_b;
  int checks = 0, failures = 0;
  int na = 0, nb = 0, bad_state = 0;

  vco_model dut (.*);

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

  always @(posedge ro_buf_a[28]) na++;
  always @(posedge ro_buf_b[28]) nb++;

  function automatic int n_active(logic [28:0] s);
    int n = 0;
    for (int i = 0; i < 29; i++) if (s[i] == s[(i + 28) % 29]) n++;
    return n;
  endfunction
  always @(ro_buf_a or ro_buf_b) begin
    #0;
    if (n_active(ro_buf_a) != 1 || n_active(ro_buf_b) != 1) bad_state++;
  end

  initial begin
    int vs [5] = '{0, 10000, -25000, 50000, -50000};
    for (int i = 0; i < 5; i++)
      for (int ph = 0; ph < 3; ph++) begin
        real v, g, fa, fb, ma, mb;
        sp = (ph != 1); sn = (ph != 0);
        vin_uv = vs[i];
        #10us;
        na = 0; nb = 0;
        #200us;
        v = vs[i] * 1.0e-6;
        g = v - A3 * v * v * v;
        fa = F0 + MM + (ph == 0 ? 0.5 : ph == 1 ? -0.5 : 0.0) * K * g;
        fb = F0      - (ph == 0 ? 0.5 : ph == 1 ? -0.5 : 0.0) * K * g;
        ma = na / 200.0; mb = nb / 200.0;
        check(ma > fa - 0.01 && ma < fa + 0.01, $sformatf("ring a %0.4f MHz want %0.4f (v=%0d ph=%0d)", ma, fa, vs[i], ph));
        check(mb > fb - 0.01 && mb < fb + 0.01, $sformatf("ring b %0.4f MHz want %0.4f (v=%0d ph=%0d)", mb, fb, vs[i], ph));
      end
    check(bad_state == 0, $sformatf("%0d ring states without exactly one active inverter", bad_state));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
