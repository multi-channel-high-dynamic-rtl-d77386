// tb_frame_packetizer: self-checking testbench for frame_packetizer at its
// default 32 channels.  Each frame uses random samples and a random channel
// mask (including all-on and all-off), and the sink stalls ready at random.
// The checker expects SYNC, then the time-stamp (one more than the frame
// before), then only the enabled channels in ascending order, with last on
// the final word.  It then holds ready low and starts twice more to see
// the overflow counter count the lost frame.  Counts frames, skipped
// channels, stalls and overflows, and fails if any of them never happened.
// 12 MHz clock; watchdog at 10 ms.
`timescale 1ns/1ps
module tb_frame_packetizer;
  import vco_fe_pkg::*;
  localparam int NCH = 32;
  logic clk = 0, rst_n = 0, start = 0, ready = 0, valid, last, busy;
  sample_t samples [NCH];
  logic [NCH-1:0] ch_en = '0;
  logic [15:0] word;
  logic [7:0]  overflow_cnt;
  int checks = 0, failures = 0;
  int n_frames = 0, n_skipped = 0, n_stall = 0, n_empty = 0;

  frame_packetizer dut (.*);
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

  // sink: collect words until last
  task automatic collect(output logic [15:0] got [$]);
    got = {};
    forever begin
      @(negedge clk);
      ready = ($urandom_range(0, 3) != 0);
      if (!ready) n_stall++;
      @(posedge clk);
      if (valid && ready) begin
        got.push_back(word);
        if (last) break;
      end
    end
    @(negedge clk);
    ready = 0;
  endtask

  initial begin
    logic [15:0] got [$], want [$];
    logic [15:0] ts_prev;
    sample_t snap [NCH];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      for (int c = 0; c < NCH; c++) samples[c] = sample_t'($urandom);
      ch_en = (f == 0) ? '1 : (f == 1) ? '0 : NCH'({$urandom, $urandom});
      snap = samples;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int c = 0; c < NCH; c++) samples[c] = 0;   // must have been captured
      collect(got);
      want = {16'hA55A, 16'(f)};
      for (int c = 0; c < NCH; c++) if (ch_en[c]) want.push_back(snap[c]); else n_skipped++;
      if (ch_en == '0) n_empty++;
      check(got.size() == want.size(), $sformatf("frame %0d length %0d want %0d", f, got.size(), want.size()));
      for (int i = 0; i < want.size() && i < got.size(); i++)
        check(got[i] == want[i], $sformatf("frame %0d word %0d %h want %h", f, i, got[i], want[i]));
      n_frames++;
      repeat (2) @(negedge clk);
      check(!busy, "busy after last word");
    end
    // overflow: start while the previous frame is still waiting for ready
    ch_en = '1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    start = 1;
    @(negedge clk); start = 0;
    check(overflow_cnt == 8'd1, $sformatf("overflow_cnt %0d", overflow_cnt));
    collect(got);
    // the lost frame still advanced the time-stamp: next frame skips one
    check(got[1] == 16'd40, "time-stamp of stalled frame");
    ch_en = '0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    collect(got);
    check(got[1] == 16'd42, $sformatf("time-stamp after overflow %0d", got[1]));
    check(n_frames > 0 && n_skipped > 0 && n_stall > 0 && n_empty > 0, "a mechanism never happened");
    $display("frames=%0d skipped=%0d stalls=%0d empty=%0d overflow=%0d", n_frames, n_skipped, n_stall, n_empty, overflow_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
