// Testbench for ro_subquantizer.  An ideal 29-stage ring with a fixed
// inverter delay drives the sub-quantizer; count_delay_line makes the
// Count1/Count/Count2/Count3 copies of the window, with Count2 placed
// 0.9 ns after the phase-path Count to stress the path mismatch.  The
// testbench counts every ring transition between the rising and the
// falling edge of the phase-path Count itself; the sub-quantizer must
// report that number.  Half of the windows are placed at random, the other
// half so that the window edges land within a few ns of a rising edge of
// stage 28 (the counter clock), where the multi-latching arbitration has to
// act.  A difference of one phase is tolerated (an edge can coincide with a
// transition at the 1 ps time resolution); a full- or half-cycle glitch
// (29 or 58 phases) fails.  The run must see arbitration events.
`timescale 1ns/1ps
module tb_ro_subquantizer;
  import vco_fe_pkg::*;

  localparam real D_NS = 3.3017;           // inverter delay: about 5.2 MHz ring
  localparam int  NWIN = 60;

  logic                rst_n = 1'b0;
  logic [N_STAGES-1:0] ro;
  logic                count_in = 1'b0, count_en = 1'b0;
  logic                c1, cph, c2, c3;
  logic [TRAV_W-1:0]   traversed;
  logic                arb_event, ph_valid;
  int checks = 0, failures = 0, arb_seen = 0;
  longint steps = 0, st_rise = 0, st_fall = 0;

  count_delay_line #(.BASE_NS(0.5), .STEP_NS(1.0), .SKEW_NS(0.9)) u_dly (
    .count_in, .count1(c1), .count_ph(cph), .count2(c2), .count3(c3));

  ro_subquantizer dut (.rst_n, .ro_buf(ro), .count(cph), .count1(c1), .count2(c2),
                       .count3(c3), .count_en, .traversed, .arb_event, .ph_valid);

  // ideal ring
  initial begin
    int k;
    for (int i = 0; i < N_STAGES; i++) ro[i] = (i % 2 == 0);
    k = 0;
    forever begin
      #(D_NS);
      ro[k] = ~ro[(k + N_STAGES - 1) % N_STAGES];
      k = (k + 1) % N_STAGES;
      steps++;
    end
  end

  always @(posedge cph) st_rise = steps;
  always @(negedge cph) st_fall = steps;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real off, len;
    longint exp_trav;
    longint got;
    #100 rst_n = 1'b1;
    for (int w = 0; w < NWIN; w++) begin
      count_en = 1'b1;
      #(1000.0);
      if (w % 2 == 0) begin
        off = real'($urandom_range(0, 400000)) / 1000.0;
        #(off);
      end else begin
        // land the rising edge of Count within -2.5..+1 ns of a stage-28 rise
        @(posedge ro[N_STAGES-1]);
        off = 58.0 * D_NS - 2.0 + real'($urandom_range(0, 3500)) / 1000.0 - 1.5;
        #(off);
      end
      count_in = 1'b1;
      len = 1500.0 + real'($urandom_range(0, 1000000)) / 1000.0;
      if (w % 4 == 1) begin
        // also the falling edge near a stage-28 rise
        #(len);
        @(posedge ro[N_STAGES-1]);
        #(58.0 * D_NS - 3.5 + real'($urandom_range(0, 3500)) / 1000.0);
      end else begin
        #(len);
      end
      count_in = 1'b0;
      #20;
      exp_trav = st_fall - st_rise;
      got      = longint'(traversed);
      checks++;
      if (got - exp_trav > 1 || exp_trav - got > 1) begin
        failures++;
        $display("FAIL window %0d: traversed=%0d expected %0d", w, got, exp_trav);
      end
      if (arb_event) arb_seen++;
      #(1000.0);
      count_en = 1'b0;
      #(500.0);
    end
    checks++;
    if (arb_seen == 0) begin
      failures++;
      $display("FAIL: no multi-latching arbitration happened");
    end
    $display("arbitration events: %0d of %0d windows", arb_seen, NWIN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
