// Front-end timing controller: derives all sampling and chopping controls
// shared by the front-ends from the 12 MHz system clock.
//
// One sample period is PERIOD clock cycles (2000 -> 6 kHz) and equals one
// chopping period: the first half is the positive chopping phase (Sp), the
// second half the negative one (Sn).  Sp and Sn overlap by OVERLAP cycles at
// each change so the diff-pair current always has a path.  Inside each half
// the phase-integration window Count is high for WIN cycles, starting
// WIN_START cycles after the chopping change so that the RO frequency has
// settled.  Count Enable opens EN_LEAD cycles before Count rises and closes
// EN_LAG cycles after it falls, leaving the sub-quantizer time to retime it
// into the RO clock.  SAMPLE_DLY cycles after each window closes, a
// one-cycle sample strobe (the SampleClk rising edge) captures the
// differential phase; sample_is_p says which chopping phase it belongs to.
// One cycle after the Sn sample, srdy (the srdyi edge) marks a new output
// sample.  frame_tick pulses at the start of every period.
//
// Counter position t (0..PERIOD-1) after reset:
//   sp        : t <  HALF+OVERLAP
//   sn        : t >= HALF or t < OVERLAP   (low during the first period until t >= HALF)
//   count     : WIN_START <= t-h < WIN_START+WIN   for h = 0 and h = HALF
//   sample    : t-h == WIN_START+WIN+SAMPLE_DLY
// All outputs are registered.  The 6 kHz rate, the 12 MHz clock, two
// windows per chopping period, the Sp/Sn overlap and the roughly 100 us of
// total integration time follow the design description; the window
// placement and the guard times are choices of this design.
`timescale 1ns/1ps
module fe_timing #(
  parameter int unsigned PERIOD     = 2000,
  parameter int unsigned OVERLAP    = 2,
  parameter int unsigned WIN_START  = 200,
  parameter int unsigned WIN        = 600,
  parameter int unsigned EN_LEAD    = 16,
  parameter int unsigned EN_LAG     = 16,
  parameter int unsigned SAMPLE_DLY = 32
) (
  input  logic clk,
  input  logic rst_n,
  output logic sp,
  output logic sn,
  output logic count,
  output logic count_en,
  output logic sample_stb,
  output logic sample_is_p,
  output logic srdy,
  output logic frame_tick
);

  localparam int unsigned HALF = PERIOD / 2;
  localparam int unsigned TW   = $clog2(PERIOD);

  initial begin
    assert (WIN_START >= EN_LEAD + OVERLAP) else $error("fe_timing: window starts too early");
    assert (WIN_START + WIN + SAMPLE_DLY + 1 < HALF) else $error("fe_timing: window does not fit a half period");
    assert (EN_LAG < SAMPLE_DLY) else $error("fe_timing: sample strobe before Count Enable closes");
  end

  logic [TW-1:0] t;
  logic          started;   // Sn stays low until the first negative phase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t       <= '0;
      started <= 1'b0;
    end else begin
      t <= (t == TW'(PERIOD - 1)) ? '0 : t + TW'(1);
      if (t == TW'(HALF)) started <= 1'b1;
    end
  end

  logic [TW-1:0] th;      // position inside the current half
  logic          in_p;    // first half
  always_comb begin
    in_p = (t < TW'(HALF));
    th   = in_p ? t : t - TW'(HALF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp          <= 1'b0;
      sn          <= 1'b0;
      count       <= 1'b0;
      count_en    <= 1'b0;
      sample_stb  <= 1'b0;
      sample_is_p <= 1'b0;
      srdy        <= 1'b0;
      frame_tick  <= 1'b0;
    end else begin
      sp          <= (t < TW'(HALF + OVERLAP));
      sn          <= (t >= TW'(HALF)) || ((t < TW'(OVERLAP)) && started);
      count       <= (th >= TW'(WIN_START)) && (th < TW'(WIN_START + WIN));
      count_en    <= (th >= TW'(WIN_START - EN_LEAD)) && (th < TW'(WIN_START + WIN + EN_LAG));
      sample_stb  <= (th == TW'(WIN_START + WIN + SAMPLE_DLY));
      sample_is_p <= in_p;
      srdy        <= !in_p && (th == TW'(WIN_START + WIN + SAMPLE_DLY + 1));
      frame_tick  <= (t == '0);
    end
  end

endmodule
