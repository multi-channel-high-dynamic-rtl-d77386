// Testbench for ro_phase_decoder.  It steps an ideal 29-stage ring one
// inverter delay at a time (stage k takes the inverse of stage k-1) from the
// phase-0 pattern, so after p steps the decoder must report p mod 58.  It
// also applies the latching error of a buffer with a shifted threshold
// (stages 28 and 0 both latched low at phase 0), where a decoder that only
// looks at the active inverter reports 29; this one must still say 0.
// Random single-stage corruptions far from the active stage must not move
// the decoded phase by more than one.
`timescale 1ns/1ps
module tb_ro_phase_decoder;
  import vco_fe_pkg::*;

  logic [N_STAGES-1:0] state;
  logic [PH_W-1:0]     phase;
  logic                valid;
  int checks = 0, failures = 0;

  ro_phase_decoder dut (.state, .phase, .valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp_phase, input logic exp_valid, input string what);
    #1;
    checks++;
    if (phase != PH_W'(exp_phase) || valid != exp_valid) begin
      failures++;
      $display("FAIL %s: state=%b phase=%0d valid=%0d, expected %0d/%0d",
               what, state, phase, valid, exp_phase, exp_valid);
    end
  endtask

  initial begin
    logic [N_STAGES-1:0] s;
    int k;
    for (int i = 0; i < N_STAGES; i++) s[i] = (i % 2 == 0);
    k = 0;
    // three full oscillation periods
    for (int p = 0; p < 3 * 58; p++) begin
      state = s;
      check(p % 58, 1'b1, "ring step");
      s[k] = ~s[(k + N_STAGES - 1) % N_STAGES];
      k = (k + 1) % N_STAGES;
    end

    // Table of the design description: phases 0, 29, 1
    state = 29'b1_0101_0101_0101_0101_0101_0101_0101; check(0, 1'b1, "phase 0 pattern");
    state = ~29'b1_0101_0101_0101_0101_0101_0101_0101; check(29, 1'b1, "phase 29 pattern");

    // Buffer-threshold latching error at phase 0: stages 28 and 0 latched low
    for (int i = 0; i < N_STAGES; i++) s[i] = (i % 2 == 0);
    s[28] = 1'b0;
    s[0]  = 1'b0;
    state = s;
    check(0, 1'b0, "half-cycle glitch case");
    // and its mirror at phase 29: stages 28 and 0 latched high
    state = ~s;
    check(29, 1'b0, "half-cycle glitch mirror");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
