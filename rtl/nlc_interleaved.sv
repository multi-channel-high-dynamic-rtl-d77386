// Interleaved nonlinearity correction for all channels of the chip.
//
// NNLC nlc_horner engines are shared by NCH channels: engine e corrects
// channels e, e+NNLC, e+2*NNLC, ... one after the other.  On start (once
// per sample period) the NCH input samples are captured; when every engine
// has worked through its channels, y holds the corrected samples and done
// pulses for one cycle.  With NCH = 32 and two engines this takes
// 16 x 7 + 2 cycles, far less than the 2000-cycle sample period.
// The input comes from the front-ends or, with use_ext, from an external
// digital stream (test mode).  With bypass the captured input is passed on
// unchanged and done follows start after one cycle.
// Sharing a few engines among the channels, the bypass and the external
// input follow the design description; the number of engines (two) and
// the channel-to-engine assignment are choices of this design.
`timescale 1ns/1ps
module nlc_interleaved
  import vco_fe_pkg::*;
#(
  parameter int unsigned NCH  = 32,
  parameter int unsigned NNLC = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    bypass,
  input  logic    use_ext,
  input  sample_t x_fe  [NCH],
  input  sample_t x_ext [NCH],
  input  coef_t   coef  [NLC_ORDER+1],
  output sample_t y     [NCH],
  output logic    done,
  output logic    busy
);

  localparam int unsigned PER = (NCH + NNLC - 1) / NNLC;   // channels per engine
  localparam int unsigned IW  = $clog2(PER + 1);

  initial assert (NCH % NNLC == 0) else $error("nlc_interleaved: NCH must be a multiple of NNLC");

  sample_t x_cap [NCH];
  logic    running;
  logic    bypass_q;

  logic [IW-1:0] idx      [NNLC];   // next channel slot to start on each engine
  logic          eng_busy [NNLC];
  logic          eng_done [NNLC];
  sample_t       eng_y    [NNLC];
  logic          eng_start[NNLC];
  sample_t       eng_x    [NNLC];
  logic          eng_fin  [NNLC];   // engine has finished all its channels

  for (genvar e = 0; e < NNLC; e++) begin : g_eng
    nlc_horner u_nlc (
      .clk, .rst_n,
      .start(eng_start[e]), .x(eng_x[e]), .coef,
      .busy(eng_busy[e]), .done(eng_done[e]), .y(eng_y[e])
    );

    always_comb begin
      eng_start[e] = running && !bypass_q && !eng_busy[e] && !eng_done[e] && !eng_fin[e]
                     && (idx[e] < IW'(PER));
      eng_x[e]     = x_cap[(idx[e] < IW'(PER)) ? e + NNLC * idx[e] : e];
    end

  end

  logic all_fin;
  always_comb begin
    all_fin = 1'b1;
    for (int e = 0; e < NNLC; e++) all_fin &= eng_fin[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      bypass_q <= 1'b0;
      done     <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        x_cap[c] <= '0;
        y[c]     <= '0;
      end
      for (int e = 0; e < NNLC; e++) begin
        idx[e]     <= '0;
        eng_fin[e] <= 1'b0;
      end
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        for (int c = 0; c < NCH; c++) x_cap[c] <= use_ext ? x_ext[c] : x_fe[c];
        for (int e = 0; e < NNLC; e++) begin
          idx[e]     <= '0;
          eng_fin[e] <= 1'b0;
        end
        running  <= 1'b1;
        bypass_q <= bypass;
      end else if (running && bypass_q) begin
        for (int c = 0; c < NCH; c++) y[c] <= x_cap[c];
        running <= 1'b0;
        done    <= 1'b1;
      end else if (running && all_fin) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else if (running) begin
        for (int e = 0; e < NNLC; e++) begin
          if (eng_done[e]) begin
            y[e + NNLC * (int'(idx[e]) - 1)] <= eng_y[e];
            if (idx[e] == IW'(PER)) eng_fin[e] <= 1'b1;
          end else if (eng_start[e]) begin
            idx[e] <= idx[e] + IW'(1);
          end
        end
      end
    end
  end

  assign busy = running;

endmodule
