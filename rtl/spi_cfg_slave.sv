// SPI configuration slave: receives commands from the host and holds the
// chip configuration registers (NLC coefficients, bypass switches, channel
// enables, HPF switch timing).
//
// Transaction (mode 0, most significant bit first, cs_n low for 32 sclk
// periods): an 8-bit command, then 24 data bits.  Command bit 7 = 1 writes
// the 24 data bits to register cmd[6:0] when the 32nd bit arrives; bit 7 = 0
// reads: the slave drives that register on miso during the 24 data bits.
// The last address, NREG-1, is a read-only status word supplied by the
// chip; addresses at or above NREG are ignored on write and read as zero.
// sclk, cs_n and mosi are asynchronous to clk; they pass a two-flop
// synchroniser and are oversampled: sclk must stay below clk/4 for writes
// and below clk/8 for reads, as miso changes three clk cycles after the
// falling sclk edge.  Register
// writes take effect in the clk domain, two to four cycles after the last
// rising sclk edge.  RESET_VALS gives each register's value after reset.
// Configuration over SPI follows the design description; the command
// format, the oversampling and the register width are choices of this
// design.
`timescale 1ns/1ps
module spi_cfg_slave #(
  parameter int unsigned        NREG       = 16,
  parameter logic [NREG*24-1:0] RESET_VALS = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  input  logic [23:0] status,       // read-only value of the last address, NREG-1
  output logic [23:0] regs [NREG],
  output logic        wr_stb        // one-cycle pulse after every register write
);

  logic [2:0] sclk_s;
  logic [1:0] cs_s;
  logic [1:0] mosi_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  logic sclk_rise, sclk_fall, sel;
  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign sel       = ~cs_s[1];

  logic [5:0]  nbits;
  logic [22:0] rx;
  logic [23:0] tx;
  logic [6:0]  addr;
  logic        is_wr;

  function automatic logic [23:0] rd(input logic [6:0] a);
    if (int'(a) == NREG - 1)  return status;
    else if (int'(a) < NREG)  return regs[int'(a)];
    else                      return 24'h0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits  <= '0;
      rx     <= '0;
      tx     <= '0;
      addr   <= '0;
      is_wr  <= 1'b0;
      miso   <= 1'b0;
      wr_stb <= 1'b0;
      for (int r = 0; r < NREG; r++) regs[r] <= RESET_VALS[r*24 +: 24];
    end else begin
      wr_stb <= 1'b0;
      if (!sel) begin
        nbits <= '0;
        miso  <= 1'b0;
      end else begin
        if (sclk_rise) begin
          rx    <= {rx[21:0], mosi_s[1]};
          nbits <= nbits + 6'd1;
          if (nbits == 6'd7) begin
            addr  <= {rx[5:0], mosi_s[1]};
            is_wr <= rx[6];
            tx    <= rd({rx[5:0], mosi_s[1]});
          end
          if (nbits == 6'd31 && is_wr && int'(addr) < NREG - 1) begin
            regs[int'(addr)] <= {rx[22:0], mosi_s[1]};
            wr_stb           <= 1'b1;
          end
        end
        if (sclk_fall && nbits >= 6'd8 && nbits < 6'd32) begin
          miso <= tx[23];
          tx   <= {tx[22:0], 1'b0};
        end
      end
    end
  end

endmodule
