// Behavioural model of the delay line that produces the multi-latching
// copies of the quantizer window signal.  It is not synthesizable logic: in
// silicon it is a chain of standard cells whose placement is constrained.
//
// From the Count edge issued by the timing controller it derives four
// delayed copies: count1 (earliest), count_ph (the Count seen by the phase
// path), count2 and count3 (latest).  count2 lies between count1 and count3
// but is offset from count_ph by SKEW_NS, modelling the mismatch between the
// phase path and the cycle path.  The spread from count1 to count3 is the
// margin of the multi-latching scheme; it must exceed the counter
// transition time plus the path mismatch and stay well below one RO period.
// Count1 ahead of Count, Count3 behind it and Count2 in between follow the
// design description; the delay values are choices of this model.
`timescale 1ns/1ps
module count_delay_line #(
  parameter real BASE_NS = 0.5,   // insertion delay to count1
  parameter real STEP_NS = 1.0,   // count1 -> count_ph and count_ph -> count3
  parameter real SKEW_NS = 0.3    // count_ph -> count2
) (
  input  logic count_in,
  output logic count1,
  output logic count_ph,
  output logic count2,
  output logic count3
);

  assign #(BASE_NS)                     count1   = count_in;
  assign #(BASE_NS + STEP_NS)           count_ph = count_in;
  assign #(BASE_NS + STEP_NS + SKEW_NS) count2   = count_in;
  assign #(BASE_NS + 2.0 * STEP_NS)     count3   = count_in;

endmodule
