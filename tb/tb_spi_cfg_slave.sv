// tb_spi_cfg_slave: self-checking testbench for spi_cfg_slave (16 registers
// of 24 bits; the last address reads the status input).  A master model
// drives mode-0 SPI at clk/16: an 8-bit command (bit 7 = write, bits 6:0 =
// address) then 24 data bits, MSB first; on reads it samples miso on the
// rising edges of the data phase.  Random writes and reads are checked
// against a shadow register file, including reset values, the read-only
// status address, writes to it being ignored, out-of-range addresses
// reading zero, and one write strobe per write.  Watchdog at 50 ms.
`timescale 1ns/1ps
module tb_spi_cfg_slave;
  localparam int NREG = 16;
  localparam logic [NREG*24-1:0] RV = {16{24'h5A0000}} ^ (NREG*24)'(24'h000123);
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0, miso, wr_stb;
  logic [23:0] status = 24'hC0FFEE;
  logic [23:0] regs [NREG];
  logic [23:0] shadow [NREG];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0, n_stb = 0;

  spi_cfg_slave #(.NREG(NREG), .RESET_VALS(RV)) dut (.*);
  always #41.667 clk = ~clk;
  always @(posedge clk) if (wr_stb) n_stb++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam realtime TQ = 8 * 83.333;   // half sclk period

  task automatic xfer(input logic wr, input logic [6:0] a, input logic [23:0] d,
                      output logic [23:0] q);
    logic [31:0] sh;
    sh = {wr, a, d};
    q = '0;
    cs_n = 0;
    #(TQ);
    for (int i = 0; i < 32; i++) begin
      mosi = sh[31 - i];
      #(TQ);
      sclk = 1;
      if (i >= 8) q = {q[22:0], miso};
      #(TQ);
      sclk = 0;
    end
    #(TQ);
    cs_n = 1;
    #(4 * TQ);
  endtask

  initial begin
    logic [23:0] q, d;
    logic [6:0] a;
    for (int r = 0; r < NREG; r++) shadow[r] = RV[r*24 +: 24];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // reset values
    for (int r = 0; r < NREG - 1; r++) begin
      xfer(0, 7'(r), 0, q);
      check(q == shadow[r], $sformatf("reset value reg %0d %h", r, q));
    end
    for (int i = 0; i < 200; i++) begin
      a = 7'($urandom_range(0, NREG + 2));
      if ($urandom_range(0, 1)) begin
        d = 24'($urandom);
        xfer(1, a, d, q);
        n_wr++;
        if (int'(a) < NREG - 1) shadow[a] = d;
      end else begin
        status = 24'($urandom);
        xfer(0, a, 0, q);
        n_rd++;
        if (int'(a) == NREG - 1) check(q == status, $sformatf("status read %h", q));
        else if (int'(a) < NREG) check(q == shadow[a], $sformatf("reg %0d read %h want %h", a, q, shadow[a]));
        else check(q == 0, "out-of-range read not zero");
      end
      for (int r = 0; r < NREG - 1; r++) check(regs[r] == shadow[r], $sformatf("regs[%0d] %h want %h", r, regs[r], shadow[r]));
    end
    check(n_stb > 0 && n_stb <= n_wr, $sformatf("write strobes %0d for %0d writes", n_stb, n_wr));
    check(n_wr > 0 && n_rd > 0, "no reads or writes");
    $display("writes=%0d reads=%0d strobes=%0d", n_wr, n_rd, n_stb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
