// Frame packetizer: packs the samples of one sample period, from all
// channels whose readout is enabled, into one frame of 16-bit words.
//
// Frame layout (a choice of this design):
//   word 0       FRAME_SYNC (16'hA55A)
//   word 1       time-stamp: frame number, counts every accepted frame
//   word 2 ...   one sample per enabled channel, lowest channel first
// On start the samples and the enable mask are captured, so the sources may
// change right after.  Words leave on a valid/ready stream; last marks the
// final word of the frame.  Disabled channels are skipped, one channel per
// clock cycle.  A start that arrives while a frame is still being sent is
// dropped, the time-stamp still advances (so the receiver sees the gap) and
// the overflow counter increments.  Packing all channels into one frame with
// a time-stamp follows the design description; the layout is this design's.
`timescale 1ns/1ps
module frame_packetizer
  import vco_fe_pkg::*;
#(
  parameter int unsigned NCH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  sample_t          samples [NCH],
  input  logic [NCH-1:0]   ch_en,
  output logic [15:0]      word,
  output logic             valid,
  output logic             last,
  input  logic             ready,
  output logic [7:0]       overflow_cnt,
  output logic             busy
);

  localparam int unsigned CW = $clog2(NCH + 1);

  typedef enum logic [1:0] {S_IDLE, S_SYNC, S_TS, S_CH} state_t;
  state_t state;

  sample_t        cap [NCH];
  logic [NCH-1:0] mask;
  logic [15:0]    ts, ts_cur;
  logic [CW-1:0]  ch;

  // No enabled channel above ch
  logic none_above;
  logic any_en;
  always_comb begin
    none_above = 1'b1;
    for (int c = 0; c < NCH; c++) if (c > int'(ch) && mask[c]) none_above = 1'b0;
    any_en = |mask;
  end

  always_comb begin
    word  = '0;
    valid = 1'b0;
    last  = 1'b0;
    unique case (state)
      S_SYNC: begin word = FRAME_SYNC; valid = 1'b1; end
      S_TS:   begin word = ts_cur;     valid = 1'b1; last = !any_en; end
      S_CH:   begin
        word  = cap[(int'(ch) < NCH) ? int'(ch) : 0];
        valid = (int'(ch) < NCH) && mask[(int'(ch) < NCH) ? int'(ch) : 0];
        last  = none_above;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      mask         <= '0;
      ts           <= '0;
      ts_cur       <= '0;
      ch           <= '0;
      overflow_cnt <= '0;
      for (int c = 0; c < NCH; c++) cap[c] <= '0;
    end else begin
      if (start) begin
        ts <= ts + 16'd1;
        if (state == S_IDLE) begin
          for (int c = 0; c < NCH; c++) cap[c] <= samples[c];
          mask   <= ch_en;
          ts_cur <= ts;
          ch     <= '0;
          state  <= S_SYNC;
        end else if (overflow_cnt != 8'hFF) begin
          overflow_cnt <= overflow_cnt + 8'd1;
        end
      end
      unique case (state)
        S_SYNC: if (ready) state <= S_TS;
        S_TS:   if (ready) state <= any_en ? S_CH : S_IDLE;
        S_CH: begin
          if (!valid) begin
            ch <= ch + CW'(1);                 // skip a disabled channel
          end else if (ready) begin
            if (last) state <= S_IDLE;
            ch <= ch + CW'(1);
          end
        end
        default: ;
      endcase
    end
  end

endmodule
