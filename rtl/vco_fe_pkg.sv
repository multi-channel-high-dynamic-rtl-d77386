// Shared constants and types of the VCO-based neural-sensing chip.
//
// The ring oscillators (ROs) have 29 inverter stages, so one oscillation
// period holds 2 x 29 = 58 distinct phases (one inverter delay each).  The
// quantizer unwraps the RO phase as 58 x cycle_count + decoded_phase.  The
// chip samples every channel at 6 kHz from a 12 MHz system clock; every
// sample leaves the quantizer, the nonlinearity correction (NLC) and the
// packetizer as a 16-bit signed word.  The stage count, the 58-phase period,
// the 5th-order correction and the 12 MHz / 6 kHz rates follow the design
// description; the word widths and the fixed-point format of the NLC
// coefficients are choices of this implementation.
`timescale 1ns/1ps
package vco_fe_pkg;

  // Ring oscillator geometry
  localparam int unsigned N_STAGES = 29;
  localparam int unsigned N_PHASES = 2 * N_STAGES;   // 58
  localparam int unsigned PH_W     = 6;              // holds 0..57

  // Cycle counter of each RO sub-quantizer (wraps; only differences are used)
  localparam int unsigned CNT_W    = 12;
  // Phase traversed in one Count window (unsigned, modulo 2^TRAV_W)
  localparam int unsigned TRAV_W   = 18;

  // Sample word leaving the quantizer and the NLC
  localparam int unsigned SAMPLE_W = 16;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // NLC: 5th-order polynomial, coefficients a0..a5 in signed Q3.15
  localparam int unsigned NLC_ORDER = 5;
  localparam int unsigned COEF_W    = 18;
  localparam int unsigned COEF_FRAC = 15;
  localparam int unsigned ACC_W     = 24;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Frame header word of the output packet
  localparam logic [15:0] FRAME_SYNC = 16'hA55A;

  // Phase-0 pattern of the ring: stage i output is 1 for even i
  function automatic logic p0_level(input int unsigned i);
    return (i % 2) == 0;
  endfunction

  // Saturate a wide signed value to SAMPLE_W bits
  function automatic sample_t sat_sample(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7FFF;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[SAMPLE_W-1:0];
  endfunction

endpackage
