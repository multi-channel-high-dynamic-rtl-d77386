// Behavioural model of the analog VCO of one front-end channel: input
// differential pair, chopper and two 29-stage current-starved ring
// oscillators (ROs) with their output buffers.  Not synthesizable: it uses
// real arithmetic and timing controls to make the RO edges.
//
// The diff pair turns the (already high-pass filtered) input voltage into a
// differential current; the chopper sends it to RO a and RO b with the sign
// given by the chopping phase: Sp alone -> +v, Sn alone -> -v, both (the
// overlap) -> 0.  RO a then runs at F0 + K/2 * g(v) and RO b at
// F0 - K/2 * g(v), so the frequency difference is K * g(v) with K = 70 MHz/V.
// g(v) = v - A3 * v^3 models the compressive diff-pair curve (A3 = 8 /V^2
// gives about -46 dBc third harmonic at 50 mV).  MISMATCH_MHZ adds a fixed
// frequency offset to RO a, which chopping cancels.  Each RO advances one
// stage per inverter delay 1 / (58 f); ro_buf[i] is the output of stage i
// and stage 0 is driven by stage 28, so the outputs follow the 58-phase
// sequence the quantizer decodes.  The ring starts at phase 0 at time zero.
// Input: vin_uv, the differential input in microvolts.  K, the 29 stages,
// the chopping and the compressive nonlinearity follow the design
// description; F0, A3 and the mismatch are assumptions of this model.
`timescale 1ns/1ps
module vco_model #(
  parameter real F0_MHZ       = 5.0,
  parameter real K_MHZ_PER_V  = 70.0,
  parameter real A3_PER_V2    = 8.0,
  parameter real MISMATCH_MHZ = 0.05
) (
  input  logic signed [31:0] vin_uv,
  input  logic               sp,
  input  logic               sn,
  output logic [28:0]        ro_buf_a,
  output logic [28:0]        ro_buf_b
);

  localparam int NST = 29;

  function automatic real fdev_mhz(input logic signed [31:0] uv, input logic p, input logic n);
    real v, g;
    v = real'(uv) * 1.0e-6;
    g = v - A3_PER_V2 * v * v * v;
    if (p && !n)      return 0.5 * K_MHZ_PER_V * g;
    else if (n && !p) return -0.5 * K_MHZ_PER_V * g;
    else              return 0.0;
  endfunction

  function automatic logic [28:0] phase0_pattern();
    logic [28:0] s;
    for (int i = 0; i < NST; i++) s[i] = (i % 2) == 0;
    return s;
  endfunction

  initial begin : ring_a
    int  k;
    real d;
    ro_buf_a = phase0_pattern();
    k = 0;
    forever begin
      d = 1000.0 / (58.0 * (F0_MHZ + MISMATCH_MHZ + fdev_mhz(vin_uv, sp, sn)));
      #(d);
      ro_buf_a[k] = ~ro_buf_a[(k + NST - 1) % NST];
      k = (k + 1) % NST;
    end
  end

  initial begin : ring_b
    int  k;
    real d;
    ro_buf_b = phase0_pattern();
    k = 0;
    forever begin
      d = 1000.0 / (58.0 * (F0_MHZ - fdev_mhz(vin_uv, sp, sn)));
      #(d);
      ro_buf_b[k] = ~ro_buf_b[(k + NST - 1) % NST];
      k = (k + 1) % NST;
    end
  end

endmodule
