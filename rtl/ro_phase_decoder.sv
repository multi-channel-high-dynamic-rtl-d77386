// RO phase decoder: turns a latched snapshot of the 29 ring-oscillator
// buffer outputs into the wrapped phase 0..57.
//
// How it works.  An XOR between the input and the output of every inverter
// (stage i is driven by stage i-1, stage 0 by stage 28) marks the single
// "active" inverter, whose input and output are still equal: phoc[i] is 0
// there and 1 everywhere else.  Phase 0 is defined as stage 0 active with its
// input and output both high; because every stage inverts, phase p (0..28)
// has stage p active, and phase p+29 has the same stage active with all
// levels inverted.  To tell the two halves apart this decoder does not look
// at the active inverter itself, whose latched level can be wrong while it
// switches (and the buffer threshold shifts with the RO supply), but at a
// settled stage four positions away: stage k+4 (for k <= 24), which has not
// switched yet in the first half, or stage k-4 (for k > 24), which already
// has.  This is the edge-detection on stable stages that removes the
// half-cycle (29 phase) glitch.  If the snapshot shows several active
// inverters (a stage latched mid-transition) the lowest index is taken and
// valid is low; valid is high when exactly one inverter is active.
//
// Interface: purely combinational; state[i] is buffer output of stage i.
// The XOR array, the phase numbering and the use of stable neighbours follow
// the design description; the choice of a distance of four stages for every
// active stage and the lowest-index priority are choices of this design.
`timescale 1ns/1ps
module ro_phase_decoder
  import vco_fe_pkg::*;
(
  input  logic [N_STAGES-1:0] state,
  output logic [PH_W-1:0]     phase,
  output logic                valid
);

  logic [N_STAGES-1:0] phoc;       // 0 marks an active inverter
  logic [N_STAGES-1:0] act;        // 1 marks an active inverter
  logic [N_STAGES-1:0] first;      // lowest active inverter, one-hot
  logic [N_STAGES-1:0] ref_half;   // per stage: first half, judged from its neighbour
  logic [PH_W-1:0]     k;
  logic                first_half;

  // The priority pick and the encoder are written as flat vector logic:
  // isolate the lowest set bit, then OR the indices of the set bits.
  always_comb begin
    phoc  = state ^ {state[N_STAGES-2:0], state[N_STAGES-1]};
    act   = ~phoc;
    first = act & (~act + N_STAGES'(1));

    for (int i = 0; i < N_STAGES; i++) begin
      if (i + 4 < N_STAGES) ref_half[i] = (state[i + 4] == p0_level(i + 4));
      else                  ref_half[i] = (state[i - 4] != p0_level(i - 4));
    end

    k = '0;
    for (int i = 0; i < N_STAGES; i++) k |= first[i] ? PH_W'(i) : '0;
    first_half = |(first & ref_half);

    valid = (act != '0) && ((act & (act - N_STAGES'(1))) == '0);
    phase = first_half ? k : k + PH_W'(N_STAGES);
  end

endmodule
