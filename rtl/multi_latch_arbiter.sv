// Multi-latching arbiter: picks the RO cycle count that belongs with the
// decoded phase.
//
// The cycle counter is latched three times, by Count1 (early), Count2 (near
// Count) and Count3 (late), giving cnt1, cnt2 and cnt3.  If all three agree
// no counter increment fell inside the latching spread and that value is
// used.  Otherwise an increment happened between Count1 and Count3, and the
// decoded phase says on which side of it the phase path was latched: a phase
// in the lower half (0..28) means the RO has already wrapped, so the count
// after the increment is wanted; a phase in the upper half (29..57) means it
// has not.  The four cases of the design description are implemented
// literally:
//   cnt1 == cnt2 != cnt3, not wrapped -> cnt1
//   cnt1 == cnt2 != cnt3, wrapped     -> cnt1 + 1 (cnt3 may be mid-transition)
//   cnt2 differs from both, wrapped   -> cnt3;  not wrapped -> cnt1
//   cnt1 != cnt2 == cnt3, wrapped     -> cnt3;  not wrapped -> cnt3 - 1
// The "cnt2 differs, not wrapped -> cnt1" and "cnt1 != cnt2 == cnt3, wrapped
// -> cnt3" entries are the symmetric completions of the four documented
// scenarios.  Combinational; counts wrap modulo 2^CNT_W.
`timescale 1ns/1ps
module multi_latch_arbiter
  import vco_fe_pkg::*;
(
  input  logic [CNT_W-1:0] cnt1,
  input  logic [CNT_W-1:0] cnt2,
  input  logic [CNT_W-1:0] cnt3,
  input  logic [PH_W-1:0]  phase,
  output logic [CNT_W-1:0] cnt,
  output logic             arbitrated   // an increment fell inside the spread
);

  logic wrapped;

  always_comb begin
    wrapped    = (phase < PH_W'(N_STAGES));
    arbitrated = 1'b1;
    if (cnt1 == cnt2 && cnt2 == cnt3) begin
      cnt        = cnt2;
      arbitrated = 1'b0;
    end else if (cnt1 == cnt2) begin
      cnt = wrapped ? cnt1 + CNT_W'(1) : cnt1;
    end else if (cnt2 == cnt3) begin
      cnt = wrapped ? cnt3 : cnt3 - CNT_W'(1);
    end else begin
      cnt = wrapped ? cnt3 : cnt1;
    end
  end

endmodule
