// tb_spi_stream_tx: self-checking testbench for spi_stream_tx (default
// sclk = clk/2).  A word source offers frames of random length and content
// through the valid/ready/last handshake, sometimes with gaps where valid
// is low.  A receiver model samples mosi on rising sclk while cs_n is low,
// 16 bits MSB first, and checks every word, that cs_n rises after each
// frame, and that sclk idles low.  Watchdog at 10 ms.
`timescale 1ns/1ps
module tb_spi_stream_tx;
  logic clk = 0, rst_n = 0, valid = 0, last = 0, ready, sclk, cs_n, mosi;
  logic [15:0] word = 0;
  int checks = 0, failures = 0, n_gap = 0;

  spi_stream_tx dut (.*);
  always #41.667 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // receiver
  logic [15:0] rx_sh;
  int rx_bits = 0, n_cs_rise = 0;
  logic [15:0] rx_q [$];
  always @(posedge sclk) if (!cs_n) begin
    rx_sh = {rx_sh[14:0], mosi};
    rx_bits++;
    if (rx_bits == 16) begin rx_q.push_back(rx_sh); rx_bits = 0; end
  end
  always @(posedge cs_n) begin
    n_cs_rise++;
    check(rx_bits == 0, "cs_n rose mid-word");
    check(sclk == 0, "sclk not idle low");
  end

  initial begin
    logic [15:0] sent [$];
    int len, rises0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      len = $urandom_range(1, 12);
      sent = {};
      rises0 = n_cs_rise;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        word = 16'($urandom); last = (i == len - 1); valid = 1;
        sent.push_back(word);
        @(posedge clk);
        while (!ready) @(posedge clk);
        @(negedge clk);
        valid = 0;
        if (i != len - 1 && $urandom_range(0, 3) == 0) begin
          n_gap++;
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
      end
      wait (cs_n);
      @(negedge clk);
      check(n_cs_rise == rises0 + 1, "cs_n did not rise once per frame");
      check(rx_q.size() == len, $sformatf("frame %0d: %0d words want %0d", f, rx_q.size(), len));
      for (int i = 0; i < len && rx_q.size() > 0; i++) begin
        logic [15:0] g;
        g = rx_q.pop_front();
        check(g == sent[i], $sformatf("word %h want %h", g, sent[i]));
      end
      rx_q = {};
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    check(n_gap > 0, "no source gaps exercised");
    $display("gaps=%0d", n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
