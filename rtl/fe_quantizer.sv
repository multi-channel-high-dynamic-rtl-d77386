// Front-end quantizer of one channel: turns the two ring oscillators of a
// chopped VCO into one baseband sample per chopping period.
//
// Each RO has its own ro_subquantizer, which measures the phase it traverses
// in the current Count window.  Their difference is the differential phase
// Phi_OSC.  The sample strobe (the SampleClk edge, twice per chopping
// period) stores Phi_OSC of the positive window (Sp) and of the negative
// window (Sn) separately; on srdy the output sample becomes
// Phi_OSC(Sp) - Phi_OSC(Sn).  That difference restores the chopped input
// to baseband (the input moved the ROs in opposite directions in the two
// phases) and cancels whatever is common to both phases, in particular the
// low-frequency flicker noise and the frequency mismatch of the ROs.  The
// result is saturated to a 16-bit signed word, so one LSB is one inverter
// delay of integrated phase.
//
// Timing: sample_stb and srdy are single-cycle pulses in the clk domain,
// issued by fe_timing long after Count3 has fallen, when the sub-quantizer
// outputs are stable.  sample_out and valid update one cycle after srdy.
// Structure and signal flow follow the design description; the saturation
// and the word width are choices of this design.
`timescale 1ns/1ps
module fe_quantizer
  import vco_fe_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_STAGES-1:0] ro_buf_a,
  input  logic [N_STAGES-1:0] ro_buf_b,
  input  logic                count,
  input  logic                count1,
  input  logic                count2,
  input  logic                count3,
  input  logic                count_en,
  input  logic                sample_stb,
  input  logic                sample_is_p,
  input  logic                srdy,
  output sample_t             sample_out,
  output logic                valid,
  output logic                arb_event,   // any arbitration in this channel since the last srdy
  output logic                ph_valid
);

  logic [TRAV_W-1:0] trav_a, trav_b;
  logic              arb_a, arb_b, pv_a, pv_b;

  ro_subquantizer u_sq_a (.rst_n, .ro_buf(ro_buf_a), .count, .count1, .count2, .count3,
                          .count_en, .traversed(trav_a), .arb_event(arb_a), .ph_valid(pv_a));
  ro_subquantizer u_sq_b (.rst_n, .ro_buf(ro_buf_b), .count, .count1, .count2, .count3,
                          .count_en, .traversed(trav_b), .arb_event(arb_b), .ph_valid(pv_b));

  logic signed [TRAV_W:0]   phi_osc;
  logic signed [TRAV_W:0]   phi_p, phi_n;
  logic signed [TRAV_W+1:0] dphi;
  logic                     arb_acc;

  assign phi_osc = $signed({1'b0, trav_a}) - $signed({1'b0, trav_b});
  assign dphi    = phi_p - phi_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi_p      <= '0;
      phi_n      <= '0;
      sample_out <= '0;
      valid      <= 1'b0;
      arb_acc    <= 1'b0;
      arb_event  <= 1'b0;
      ph_valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (sample_stb) begin
        if (sample_is_p) phi_p <= phi_osc;
        else             phi_n <= phi_osc;
        arb_acc <= arb_acc | arb_a | arb_b;
      end
      if (srdy) begin
        sample_out <= sat_sample(48'(dphi));
        valid      <= 1'b1;
        arb_event  <= arb_acc;
        arb_acc    <= 1'b0;
        ph_valid   <= pv_a & pv_b;
      end
    end
  end

endmodule
