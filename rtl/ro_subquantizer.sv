// Glitch-free RO sub-quantizer: measures the phase one ring oscillator
// traverses while Count is high, with a resolution of one inverter delay.
//
// Phase path: the 29 buffered stage outputs are latched on the rising edge
// of Count (initial state) and on its falling edge (final state), and each
// snapshot is decoded to a wrapped phase 0..57 by ro_phase_decoder.
// Cycle path: a binary counter is clocked by the rising edge of ro_buf[28],
// the input of the starting inverter, so it increments exactly when the
// phase wraps from 57 to 0.  Its enable, Count Enable, comes from the system
// clock domain and is retimed by two flip-flops clocked by ro_buf[28]
// before it reaches the counter, so the counter never starts from a
// metastable state.  Multi-latching: the counter output is latched at both
// edges of Count1, Count2 and Count3 (a delay line spreads them around
// Count), and multi_latch_arbiter picks the count that matches the decoded
// phase, which removes full-cycle (58 phase) glitches when the phase wrap
// and the counter increment straddle the latching edges.
// Output: traversed = 58 * (final count - initial count) + final phase -
// initial phase, modulo 2^TRAV_W; it is stable from the falling edge of
// Count3 until the next rising edge of Count1.
//
// All of this structure follows the design description.  The counter and
// output widths, the free-running (never cleared) counter and the reset are
// choices of this design.  The latches are clocked by asynchronous signals
// on purpose: this block sits on the analog-digital boundary.
`timescale 1ns/1ps
module ro_subquantizer
  import vco_fe_pkg::*;
(
  input  logic                rst_n,
  input  logic [N_STAGES-1:0] ro_buf,     // buffered RO stage outputs
  input  logic                count,      // phase-path latching window
  input  logic                count1,     // early copy of Count
  input  logic                count2,     // middle copy of Count
  input  logic                count3,     // late copy of Count
  input  logic                count_en,   // Count Enable, system-clock domain
  output logic [TRAV_W-1:0]   traversed,
  output logic                arb_event,  // an arbitration changed the outcome this window
  output logic                ph_valid    // each snapshot showed exactly one active inverter
);

  // ---------------- phase path ----------------
  logic [N_STAGES-1:0] init_state, final_state;

  always_ff @(posedge count or negedge rst_n) begin
    if (!rst_n) init_state <= '0;
    else        init_state <= ro_buf;
  end

  always_ff @(negedge count or negedge rst_n) begin
    if (!rst_n) final_state <= '0;
    else        final_state <= ro_buf;
  end

  logic [PH_W-1:0] ph_init, ph_final;
  logic            ph_init_ok, ph_final_ok;

  ro_phase_decoder u_dec_init  (.state(init_state),  .phase(ph_init),  .valid(ph_init_ok));
  ro_phase_decoder u_dec_final (.state(final_state), .phase(ph_final), .valid(ph_final_ok));

  // ---------------- cycle path ----------------
  logic             en_s1, en_s2;
  logic [CNT_W-1:0] cycle_cnt;

  always_ff @(posedge ro_buf[N_STAGES-1] or negedge rst_n) begin
    if (!rst_n) begin
      en_s1     <= 1'b0;
      en_s2     <= 1'b0;
      cycle_cnt <= '0;
    end else begin
      en_s1 <= count_en;
      en_s2 <= en_s1;
      if (en_s2) cycle_cnt <= cycle_cnt + CNT_W'(1);
    end
  end

  logic [CNT_W-1:0] c1_i, c2_i, c3_i, c1_f, c2_f, c3_f;

  always_ff @(posedge count1 or negedge rst_n)
    if (!rst_n) c1_i <= '0; else c1_i <= cycle_cnt;
  always_ff @(posedge count2 or negedge rst_n)
    if (!rst_n) c2_i <= '0; else c2_i <= cycle_cnt;
  always_ff @(posedge count3 or negedge rst_n)
    if (!rst_n) c3_i <= '0; else c3_i <= cycle_cnt;
  always_ff @(negedge count1 or negedge rst_n)
    if (!rst_n) c1_f <= '0; else c1_f <= cycle_cnt;
  always_ff @(negedge count2 or negedge rst_n)
    if (!rst_n) c2_f <= '0; else c2_f <= cycle_cnt;
  always_ff @(negedge count3 or negedge rst_n)
    if (!rst_n) c3_f <= '0; else c3_f <= cycle_cnt;

  logic [CNT_W-1:0] cnt_init, cnt_final;
  logic             arb_i, arb_f;

  multi_latch_arbiter u_arb_init  (.cnt1(c1_i), .cnt2(c2_i), .cnt3(c3_i),
                                   .phase(ph_init),  .cnt(cnt_init),  .arbitrated(arb_i));
  multi_latch_arbiter u_arb_final (.cnt1(c1_f), .cnt2(c2_f), .cnt3(c3_f),
                                   .phase(ph_final), .cnt(cnt_final), .arbitrated(arb_f));

  // ---------------- unwrapping ----------------
  logic [CNT_W-1:0] dcnt;
  always_comb begin
    dcnt      = cnt_final - cnt_init;
    traversed = TRAV_W'(dcnt) * TRAV_W'(N_PHASES) + TRAV_W'(ph_final) - TRAV_W'(ph_init);
    arb_event = (arb_i && cnt_init != c2_i) || (arb_f && cnt_final != c2_f);
  end

  assign ph_valid = ph_init_ok & ph_final_ok;

endmodule
