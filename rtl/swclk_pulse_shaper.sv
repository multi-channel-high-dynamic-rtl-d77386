// Behavioural model of the swclk pulse generator of a duty-cycled-resistor
// high-pass filter stage.  It is not synthesizable logic: it relies on a
// physical delay line.
//
// Signal a is the slow square wave from hpf_swclk_gen.  It is delayed by
// dly_ctrl nanoseconds (a tap of a 15-stage, 1 ns per stage delay line) and
// inverted into b; swclk = a AND b is high for dly_ctrl ns after every rising
// edge of a, which at 10 kHz is a duty cycle well below 1e-4.  dly_ctrl = 0
// is treated as 1 ns.  The delay/invert/AND structure, the 1 ns tuning step
// and the few-ns pulse follow the design description; the 4-bit control
// width is a choice of this model.
`timescale 1ns/1ps
module swclk_pulse_shaper (
  input  logic       a,
  input  logic [3:0] dly_ctrl,
  output logic       swclk
);

  logic [15:0] tap;

  assign tap[0] = a;
  for (genvar i = 1; i < 16; i++) begin : g_dly
    assign #1 tap[i] = tap[i-1];
  end

  logic b;
  assign b     = ~tap[(dly_ctrl == 4'd0) ? 4'd1 : dly_ctrl];
  assign swclk = a & b;

endmodule
