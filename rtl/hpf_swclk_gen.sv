// Digital base-signal generator for the two stages of the multi-rate
// duty-cycled-resistor (DCR) high-pass filter.
//
// The fast stage (first HPF stage, switch S1) is refreshed at about 10 kHz
// and the slow stage (second stage, switch S2) at about 500 Hz.  This block
// divides the system clock into two 50 % square waves a1 (DIV1 cycles per
// period) and a2 (DIV2 cycles per period); a swclk_pulse_shaper turns each
// rising edge into a nanosecond switch pulse.  DIV2 is a multiple of DIV1
// and the rising edges of a2 are placed OFFSET2 cycles after a rising edge
// of a1, a quarter a1 period by default, so no a2 edge meets an a1 edge.
// en1/en2 enable the stages (a disabled stage holds its output low), which
// allows the stage-1-only mode used to characterise the filter.  Both
// outputs are registered.  The two rates and the misaligned edges follow
// the design description; the exact dividers and the enables are choices
// of this design.
`timescale 1ns/1ps
module hpf_swclk_gen #(
  parameter int unsigned DIV1    = 1200,    // 12 MHz / 1200  = 10 kHz
  parameter int unsigned DIV2    = 24000,   // 12 MHz / 24000 = 500 Hz
  parameter int unsigned OFFSET2 = DIV1 / 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en1,
  input  logic en2,
  output logic a1,
  output logic a2
);

  localparam int unsigned W1 = $clog2(DIV1);
  localparam int unsigned W2 = $clog2(DIV2);

  initial begin
    assert (DIV2 % DIV1 == 0) else $error("hpf_swclk_gen: DIV2 must be a multiple of DIV1");
    assert (OFFSET2 % (DIV1 / 2) != 0) else $error("hpf_swclk_gen: S1 and S2 edges would coincide");
  end

  logic [W1-1:0] c1;
  logic [W2-1:0] c2;

  // c2 starts OFFSET2 cycles before its wrap so that its wrap (rising edge
  // of a2) lands OFFSET2 cycles after a wrap of c1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0;
      c2 <= W2'(DIV2 - (OFFSET2 % DIV2));
      a1 <= 1'b0;
      a2 <= 1'b0;
    end else begin
      c1 <= (c1 == W1'(DIV1 - 1)) ? '0 : c1 + W1'(1);
      c2 <= (c2 == W2'(DIV2 - 1)) ? '0 : c2 + W2'(1);
      a1 <= en1 && (c1 < W1'(DIV1 / 2));
      a2 <= en2 && (c2 < W2'(DIV2 / 2));
    end
  end

endmodule
