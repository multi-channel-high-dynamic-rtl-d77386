// tb_vco_sensing_chip: end-to-end testbench of the whole sensing chip at its
// default size (32 channels, 2 NLC engines, 6 kHz sampling from 12 MHz).
// Each channel has its own behavioural VCO with a fixed input between -50
// and +50 mV.  The testbench plays the roles around the chip: a
// configuration SPI master, a receiver on the data SPI that rebuilds
// frames, and a stand-in artifact-rejection engine that returns the
// negated samples.  It steps through configurations and after each change
// discards the frame in flight, then checks the next one word by word:
//   1 reset defaults (unity NLC, artifact rejection bypassed)
//   2 NLC with offset and cubic coefficients written over SPI
//   3 NLC bypass
//   4 external test data into the NLC
//   5 artifact-rejection path, with one duplicated hand-off to force a lost
//     frame that the status register must report
//   6 a sparse channel-enable mask
// Every frame must carry SYNC, a time-stamp one higher than the frame
// before (two higher after the forced loss), and the enabled channels.
// Mechanism counters (chopped samples checked, multi-latch arbitrations,
// NLC, bypass, external, artifact path, skipped channels, frame loss,
// status reads, swclk pulses of both HPF stages) must all be non-zero.
// Watchdog at 12 ms of simulated time.
`timescale 1ns/1ps
module tb_vco_sensing_chip;
  import vco_fe_pkg::*;
  localparam int NCH = 32;
  localparam real K = 70.0e6, A3 = 8.0, TWIN = 600 * 83.333e-9;

  logic clk = 0, rst_n = 0;
  logic [N_STAGES-1:0] ro_buf_a [NCH], ro_buf_b [NCH];
  logic sp, sn, swclk1, swclk2;
  logic cfg_sclk = 0, cfg_cs_n = 1, cfg_mosi = 0, cfg_miso;
  logic dout_sclk, dout_cs_n, dout_mosi;
  sample_t ext_sample [NCH], asar_in [NCH], asar_out [NCH];
  logic asar_in_valid, asar_out_valid = 0, frame_start;
  logic [NCH-1:0] arb_event;
  logic signed [31:0] vin_uv [NCH];

  int checks = 0, failures = 0;
  int m_samples = 0, m_arb = 0, m_nlc = 0, m_bypass = 0, m_ext = 0, m_asar = 0;
  int m_skip = 0, m_loss = 0, m_status = 0, m_sw1 = 0, m_sw2 = 0;

  vco_sensing_chip dut (.*);

  for (genvar c = 0; c < NCH; c++) begin : g_vco
    vco_model u_vco (.vin_uv(vin_uv[c]), .sp, .sn, .ro_buf_a(ro_buf_a[c]), .ro_buf_b(ro_buf_b[c]));
  end

  always #41.667 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #12ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge swclk1) m_sw1++;
  always @(posedge swclk2) m_sw2++;
  always @(posedge clk) if (frame_start) m_arb += $countones(arb_event);

  // ---------------- data SPI receiver ----------------
  logic [15:0] cur [$], frame [$];
  logic [15:0] rx_sh;
  int rx_bits = 0, n_frames = 0;
  always @(posedge dout_sclk) if (!dout_cs_n) begin
    rx_sh = {rx_sh[14:0], dout_mosi};
    rx_bits++;
    if (rx_bits == 16) begin cur.push_back(rx_sh); rx_bits = 0; end
  end
  always @(posedge dout_cs_n) begin
    frame = cur;
    cur = {};
    n_frames++;
  end

  // ---------------- artifact-rejection stand-in ----------------
  bit asar_dup = 0;
  int asar_dup_done = 0;
  always @(posedge clk) if (asar_in_valid) begin
    sample_t keep [NCH];
    keep = asar_in;
    fork begin
      repeat (20) @(posedge clk);
      for (int c = 0; c < NCH; c++) asar_out[c] <= (keep[c] == -16'sd32768) ? 16'sh7FFF : -keep[c];
      asar_out_valid <= 1;
      @(posedge clk) asar_out_valid <= 0;
      if (asar_dup) begin
        asar_dup = 0;
        repeat (50) @(posedge clk);
        asar_out_valid <= 1;
        @(posedge clk) asar_out_valid <= 0;
        asar_dup_done++;
      end
    end join_none
  end

  // ---------------- configuration SPI master ----------------
  localparam realtime TQ = 8 * 83.333;
  task automatic cfg_xfer(input logic wr, input logic [6:0] a, input logic [23:0] d,
                          output logic [23:0] q);
    logic [31:0] sh;
    sh = {wr, a, d};
    q = '0;
    cfg_cs_n = 0;
    #(TQ);
    for (int i = 0; i < 32; i++) begin
      cfg_mosi = sh[31 - i];
      #(TQ);
      cfg_sclk = 1;
      if (i >= 8) q = {q[22:0], cfg_miso};
      #(TQ);
      cfg_sclk = 0;
    end
    #(TQ);
    cfg_cs_n = 1;
    #(4 * TQ);
  endtask
  task automatic cfg_write(input int a, input logic [23:0] d);
    logic [23:0] q;
    cfg_xfer(1, 7'(a), d, q);
  endtask
  task automatic cfg_read(input int a, output logic [23:0] q);
    cfg_xfer(0, 7'(a), 24'h0, q);
  endtask

  // ---------------- reference ----------------
  coef_t coef [NLC_ORDER+1];
  logic [NCH-1:0] ch_en;
  function automatic longint sat(longint v, int w);
    longint mx = (64'sd1 <<< (w - 1)) - 1;
    longint mn = -(64'sd1 <<< (w - 1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction
  function automatic longint horner(longint xv);
    longint acc = 0;
    for (int k = NLC_ORDER; k >= 0; k--)
      acc = sat(longint'(coef[k]) + ((xv * acc) >>> COEF_FRAC), ACC_W);
    return sat(acc, SAMPLE_W);
  endfunction
  function automatic real fe_ideal(int c);
    real v;
    v = vin_uv[c] * 1.0e-6;
    return 58.0 * 2.0 * K * (v - A3 * v * v * v) * TWIN;
  endfunction

  typedef enum int {M_NLC, M_BYP, M_EXT, M_ASAR} mode_t;
  int last_ts = -1;

  task automatic wait_frame();
    int n0 = n_frames;
    while (n_frames == n0) @(posedge clk);
  endtask

  task automatic check_frames(mode_t mode, int nframes);
    for (int f = 0; f < nframes; f++) begin
      int i, step;
      wait_frame();
      check(frame.size() >= 2 && frame[0] == 16'hA55A, "frame SYNC word");
      if (frame.size() < 2) continue;
      step = (last_ts < 0) ? 1 : int'(frame[1]) - last_ts;
      last_ts = int'(frame[1]);
      check(frame.size() == 2 + $countones(ch_en), $sformatf("frame length %0d want %0d", frame.size(), 2 + $countones(ch_en)));
      i = 2;
      for (int c = 0; c < NCH; c++) begin
        real x, want, tol;
        sample_t got;
        if (!ch_en[c]) begin m_skip++; continue; end
        if (i >= frame.size()) break;
        got = sample_t'(frame[i]);
        i++;
        x = (mode == M_EXT) ? real'(ext_sample[c]) : fe_ideal(c);
        tol = (mode == M_EXT) ? 0.5 : 6.0 + 0.001 * (x < 0 ? -x : x);
        if (mode == M_NLC || mode == M_ASAR || mode == M_EXT) begin
          // push the ideal input through the reference polynomial
          want = real'(horner(longint'($rtoi(x))));
          tol = tol * 1.2 + 1.0;
        end else want = x;
        if (mode == M_ASAR) want = -want;
        check(real'(got) > want - tol && real'(got) < want + tol,
              $sformatf("mode %0d ch %0d got %0d want %0.1f", mode, c, got, want));
        if (mode != M_EXT) m_samples++;
      end
      case (mode)
        M_NLC:  m_nlc++;
        M_BYP:  m_bypass++;
        M_EXT:  m_ext++;
        M_ASAR: m_asar++;
        default: ;
      endcase
    end
  endtask

  task automatic settle();
    $display("[%0t] settling, %0d frames so far", $time, n_frames);
    wait_frame();
    last_ts = int'(frame[1]);
  endtask

  initial begin
    logic [23:0] st;
    for (int c = 0; c < NCH; c++) begin
      vin_uv[c]     = -50000 + c * 3225;
      ext_sample[c] = sample_t'(c * 2000 - 31000);
    end
    foreach (coef[k]) coef[k] = 0;
    coef[1] = 18'sd32768;
    ch_en = '1;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // 1: defaults
    settle();
    check_frames(M_NLC, 1);
    // 2: offset and cubic coefficients
    coef[0] = 18'sd1000; coef[3] = -18'sd6000;
    cfg_write(8, 24'(coef[0]));
    cfg_write(11, 24'($unsigned(coef[3])));
    settle();
    check_frames(M_NLC, 1);
    // 3: NLC bypass
    cfg_write(0, 24'h1B);
    settle();
    check_frames(M_BYP, 1);
    // 4: external data through the NLC
    cfg_write(0, 24'h1E);
    settle();
    check_frames(M_EXT, 1);
    // 5: artifact-rejection path
    cfg_write(0, 24'h18);
    settle();
    check_frames(M_ASAR, 1);
    asar_dup = 1;
    wait (asar_dup_done == 1);
    wait_frame();
    wait_frame();
    check(int'(frame[1]) - last_ts == 3, $sformatf("time-stamp step after loss %0d", int'(frame[1]) - last_ts));
    last_ts = int'(frame[1]);
    cfg_read(15, st);
    m_status++;
    check(st[7:0] == 8'd1, $sformatf("overflow count %0d", st[7:0]));
    check(st[9] == 1'b1, "phase decode invalid in some channel");
    if (st[7:0] == 8'd1) m_loss++;
    // 6: sparse channel mask
    ch_en = 32'h8001_00F5;
    cfg_write(0, 24'h1A);
    cfg_write(1, 24'h00F5);
    cfg_write(2, 24'h8001);
    settle();
    check_frames(M_NLC, 1);
    cfg_read(1, st);
    m_status++;
    check(st == 24'h00F5, "channel enable read-back");

    $display("mechanisms: samples=%0d arbitrations=%0d nlc=%0d bypass=%0d ext=%0d asar=%0d skipped=%0d loss=%0d status=%0d swclk1=%0d swclk2=%0d",
             m_samples, m_arb, m_nlc, m_bypass, m_ext, m_asar, m_skip, m_loss, m_status, m_sw1, m_sw2);
    check(m_samples > 0, "no front-end sample checked");
    check(m_arb > 0, "multi-latch arbitration never happened");
    check(m_nlc > 0, "NLC path never ran");
    check(m_bypass > 0, "NLC bypass never ran");
    check(m_ext > 0, "external data never ran");
    check(m_asar > 0, "artifact-rejection path never ran");
    check(m_skip > 0, "no channel skipped");
    check(m_loss > 0, "frame loss never reported");
    check(m_status > 0, "no status read");
    check(m_sw1 > 0 && m_sw2 > 0, "HPF switch pulses missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
