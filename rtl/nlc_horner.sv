// Nonlinearity-correction (NLC) engine: evaluates the 5th-order correction
// polynomial y = a0 + a1 x + a2 x^2 + a3 x^3 + a4 x^4 + a5 x^5 with a single
// multiply-accumulate unit, using Horner's method:
//   y = a0 + x(a1 + x(a2 + x(a3 + x(a4 + x(a5 + x*0)))))
// A start pulse loads x and clears the accumulator; then one MAC step per
// clock, acc <- a[k] + x*acc, runs for k = 5 down to 0 (six steps, the first
// being a5 + x*0), after which done pulses for one cycle and y holds the
// result.  done rises on the 6th clock edge after the edge that samples start; a new start is accepted
// once busy is low.
//
// Number format (a choice of this design): x and y are 16-bit signed
// samples read as fractions of full scale, x/2^15.  Coefficients are signed
// Q3.15 (18 bits, range -4..+4), so a1 = 32768 is unity gain.  The product
// x*acc is shifted right by 15 (truncating toward minus infinity) and every
// accumulator update saturates to 24 bits; y saturates to 16 bits.  The
// polynomial order, Horner's method and the one-MAC-plus-sequencer
// structure follow the design description; coefficients come from outside
// (foreground calibration).
`timescale 1ns/1ps
module nlc_horner
  import vco_fe_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t x,
  input  coef_t   coef [NLC_ORDER+1],   // coef[k] multiplies x^k
  output logic    busy,
  output logic    done,
  output sample_t y
);

  typedef logic signed [ACC_W-1:0] acc_t;

  localparam acc_t ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam acc_t ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  sample_t x_q;
  acc_t    acc;
  logic [2:0] k;

  // One MAC step
  logic signed [ACC_W+SAMPLE_W-1:0] prod;
  logic signed [ACC_W+SAMPLE_W-1:0] sum;
  acc_t                             acc_next;

  always_comb begin
    prod = (ACC_W+SAMPLE_W)'(x_q) * (ACC_W+SAMPLE_W)'(acc);
    sum  = (prod >>> COEF_FRAC) + (ACC_W+SAMPLE_W)'(coef[k]);
    if (sum > (ACC_W+SAMPLE_W)'(ACC_MAX))      acc_next = ACC_MAX;
    else if (sum < (ACC_W+SAMPLE_W)'(ACC_MIN)) acc_next = ACC_MIN;
    else                                       acc_next = sum[ACC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q  <= '0;
      acc  <= '0;
      k    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      y    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          x_q  <= x;
          acc  <= '0;
          k    <= 3'(NLC_ORDER);
          busy <= 1'b1;
        end
      end else begin
        acc <= acc_next;
        if (k == 3'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= sat_sample(48'(acc_next));
        end else begin
          k <= k - 3'd1;
        end
      end
    end
  end

endmodule
