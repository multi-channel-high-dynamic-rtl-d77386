// SPI transmitter that streams the packet words of the chip to the
// downstream module.  The chip is the SPI master of this link: it drives
// sclk, a chip select and the data line.
//
// Mode 0: sclk idles low, data changes while sclk is low and is sampled by
// the receiver on the rising edge, most significant bit first, 16 bits per
// word.  cs_n goes low before the first word of a frame and high after the
// word marked last, for at least one clock cycle.  Each sclk phase lasts
// HALF clock cycles (HALF = 1 gives 6 MHz from 12 MHz, enough for a
// 34-word frame in under 1100 of the 2000 cycles of a sample period).  A
// word is taken (ready high for one cycle) when the previous one has been
// sent; if no word is waiting, sclk pauses low with cs_n still low.
// Sending packets under the SPI protocol follows the design description;
// the master role, mode, word size and clock rate are choices of this
// design.
`timescale 1ns/1ps
module spi_stream_tx #(
  parameter int unsigned HALF = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] word,
  input  logic        valid,
  input  logic        last,
  output logic        ready,
  output logic        sclk,
  output logic        cs_n,
  output logic        mosi
);

  localparam int unsigned HW = (HALF > 1) ? $clog2(HALF) : 1;

  typedef enum logic [1:0] {T_IDLE, T_LOW, T_HIGH, T_GAP} tstate_t;
  tstate_t state;

  logic [15:0]   sh;
  logic [3:0]    bitn;
  logic          last_q;
  logic [HW-1:0] tick;
  logic          tick_end;

  assign tick_end = (tick == HW'(HALF - 1));
  // take a new word when idle, or right after the last bit of a word
  assign ready = valid && ((state == T_IDLE) ||
                 (state == T_HIGH && tick_end && bitn == 4'd0 && !last_q) ||
                 (state == T_GAP  && tick_end && !last_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= T_IDLE;
      sh     <= '0;
      bitn   <= '0;
      last_q <= 1'b0;
      tick   <= '0;
      sclk   <= 1'b0;
      cs_n   <= 1'b1;
      mosi   <= 1'b0;
    end else begin
      tick <= tick_end ? '0 : tick + HW'(1);
      unique case (state)
        T_IDLE: begin
          sclk <= 1'b0;
          tick <= '0;
          if (valid) begin
            cs_n   <= 1'b0;
            sh     <= word;
            mosi   <= word[15];
            bitn   <= 4'd15;
            last_q <= last;
            state  <= T_LOW;
          end else begin
            cs_n <= 1'b1;
          end
        end
        T_LOW: if (tick_end) begin
          sclk  <= 1'b1;
          state <= T_HIGH;
        end
        T_HIGH: if (tick_end) begin
          sclk <= 1'b0;
          if (bitn != 4'd0) begin
            bitn  <= bitn - 4'd1;
            sh    <= {sh[14:0], 1'b0};
            mosi  <= sh[14];
            state <= T_LOW;
          end else if (ready) begin
            sh     <= word;
            mosi   <= word[15];
            bitn   <= 4'd15;
            last_q <= last;
            state  <= T_LOW;
          end else begin
            state <= T_GAP;
          end
        end
        T_GAP: if (tick_end) begin
          if (last_q) begin
            cs_n  <= 1'b1;
            state <= T_IDLE;          // cs_n high for at least one cycle
          end else if (ready) begin
            sh     <= word;
            mosi   <= word[15];
            bitn   <= 4'd15;
            last_q <= last;
            state  <= T_LOW;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
