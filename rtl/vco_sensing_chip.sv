// Multi-channel VCO-based neural-sensing chip (digital part and its
// mixed-signal interface).
//
// Each of the NCH front-ends converts its electrode voltage into the
// frequency difference of two chopped ring oscillators (the VCO, outside
// this module: its 29 buffered stage outputs per RO come in on ro_buf_a and
// ro_buf_b).  Inside, one fe_timing controller drives all front-ends: the
// chopping phases sp/sn go out to the VCOs, and the Count window, passed
// through a per-channel count_delay_line, clocks the glitch-free
// sub-quantizers of each fe_quantizer.  Once per 6 kHz sample period the
// NCH quantizer outputs are corrected by nlc_interleaved (two shared
// Horner engines), handed to the artifact-rejection (ASAR) engine through
// the asar_* ports (or past it when bypass_asar is set), packed into one
// frame by frame_packetizer and streamed by spi_stream_tx.  hpf_swclk_gen
// and two swclk_pulse_shaper models make the nanosecond switch pulses of
// the two-stage duty-cycled-resistor high-pass filters (swclk1, swclk2).
// The host configures the chip through spi_cfg_slave.
//
// Register map (24-bit registers; reset value in brackets):
//   0  control   [0] bypass_nlc [1] bypass_asar [2] use_ext_data
//                [3] HPF stage-1 enable [4] HPF stage-2 enable      [0x00001A]
//   1  readout enable of channels 15..0                            [0x00FFFF]
//   2  readout enable of channels 31..16                           [0x00FFFF]
//   3  [3:0] swclk1 pulse width, [7:4] swclk2 pulse width, in ns   [0x000033]
//   8..13  NLC coefficients a0..a5, signed Q3.15 in bits [17:0]    [a1 = 1.0]
//   15 status (read only): [7:0] dropped-frame count, [8] NLC busy,
//      [9] every channel decoded a valid RO phase, [10] packetizer busy
// ASAR is bypassed after reset because the engine is external to this RTL.
// Timing: a frame starts about 40 cycles after each srdy (7 cycles per
// channel and engine of NLC work) and takes about 35 x 32 + 2 cycles on the
// SPI link at 6 MHz.  What the chip contains and the order of the chain
// follow the design description; the register map, frame format and the
// SPI roles are choices of this design.
`timescale 1ns/1ps
module vco_sensing_chip
  import vco_fe_pkg::*;
#(
  parameter int unsigned NCH    = 32,
  parameter int unsigned NNLC   = 2,
  parameter int unsigned PERIOD = 2000
) (
  input  logic                clk,         // 12 MHz from the crystal oscillator
  input  logic                rst_n,       // from the power-on reset
  // VCO interface
  input  logic [N_STAGES-1:0] ro_buf_a [NCH],
  input  logic [N_STAGES-1:0] ro_buf_b [NCH],
  output logic                sp,
  output logic                sn,
  output logic                swclk1,
  output logic                swclk2,
  // configuration SPI (chip is slave)
  input  logic                cfg_sclk,
  input  logic                cfg_cs_n,
  input  logic                cfg_mosi,
  output logic                cfg_miso,
  // data SPI (chip is master)
  output logic                dout_sclk,
  output logic                dout_cs_n,
  output logic                dout_mosi,
  // external test stream into the NLC
  input  sample_t             ext_sample [NCH],
  // artifact-rejection engine hand-off
  output sample_t             asar_in [NCH],
  output logic                asar_in_valid,
  input  sample_t             asar_out [NCH],
  input  logic                asar_out_valid,
  // observation
  output logic                frame_start,
  output logic [NCH-1:0]      arb_event
);

  initial assert (NCH <= 32) else $error("vco_sensing_chip: register map holds 32 channel enables");

  // ---------------- configuration ----------------
  localparam int unsigned NREG = 16;
  localparam logic [NREG*24-1:0] CFG_RESET =
      ((NREG*24)'(24'h00001A) << (0*24)) | ((NREG*24)'(24'h00FFFF) << (1*24)) |
      ((NREG*24)'(24'h00FFFF) << (2*24)) | ((NREG*24)'(24'h000033) << (3*24)) |
      ((NREG*24)'(24'h008000) << (9*24));

  logic [23:0] regs [NREG];
  logic [23:0] status;
  logic [7:0]  overflow_cnt;
  logic        nlc_busy;

  spi_cfg_slave #(.NREG(NREG), .RESET_VALS(CFG_RESET)) u_cfg (
    .clk, .rst_n, .sclk(cfg_sclk), .cs_n(cfg_cs_n), .mosi(cfg_mosi), .miso(cfg_miso),
    .status, .regs(regs), .wr_stb()
  );

  logic bypass_nlc, bypass_asar, use_ext, hpf_en1, hpf_en2;
  logic [NCH-1:0] ch_en;
  coef_t coef [NLC_ORDER+1];

  always_comb begin
    bypass_nlc  = regs[0][0];
    bypass_asar = regs[0][1];
    use_ext     = regs[0][2];
    hpf_en1     = regs[0][3];
    hpf_en2     = regs[0][4];
    ch_en       = NCH'({regs[2][15:0], regs[1][15:0]});
    for (int k = 0; k <= NLC_ORDER; k++) coef[k] = regs[8 + k][COEF_W-1:0];
  end

  // ---------------- HPF switch clocks ----------------
  logic a1, a2;
  hpf_swclk_gen u_swclk (.clk, .rst_n, .en1(hpf_en1), .en2(hpf_en2), .a1, .a2);
  swclk_pulse_shaper u_ps1 (.a(a1), .dly_ctrl(regs[3][3:0]), .swclk(swclk1));
  swclk_pulse_shaper u_ps2 (.a(a2), .dly_ctrl(regs[3][7:4]), .swclk(swclk2));

  // ---------------- front-end timing ----------------
  logic count, count_en, sample_stb, sample_is_p, srdy;
  fe_timing #(.PERIOD(PERIOD)) u_timing (
    .clk, .rst_n, .sp, .sn, .count, .count_en, .sample_stb, .sample_is_p,
    .srdy, .frame_tick()
  );

  // ---------------- front-end quantizers ----------------
  sample_t fe_sample [NCH];
  logic    fe_valid  [NCH];
  logic    fe_phv    [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_fe
    logic c1, cph, c2, c3;
    count_delay_line u_dly (.count_in(count), .count1(c1), .count_ph(cph), .count2(c2), .count3(c3));
    fe_quantizer u_q (
      .clk, .rst_n,
      .ro_buf_a(ro_buf_a[c]), .ro_buf_b(ro_buf_b[c]),
      .count(cph), .count1(c1), .count2(c2), .count3(c3), .count_en,
      .sample_stb, .sample_is_p, .srdy,
      .sample_out(fe_sample[c]), .valid(fe_valid[c]),
      .arb_event(arb_event[c]), .ph_valid(fe_phv[c])
    );
  end

  // ---------------- nonlinearity correction ----------------
  sample_t nlc_y [NCH];
  logic    nlc_done;
  nlc_interleaved #(.NCH(NCH), .NNLC(NNLC)) u_nlc (
    .clk, .rst_n, .start(fe_valid[0]), .bypass(bypass_nlc), .use_ext,
    .x_fe(fe_sample), .x_ext(ext_sample), .coef, .y(nlc_y), .done(nlc_done), .busy(nlc_busy)
  );

  assign asar_in       = nlc_y;
  assign asar_in_valid = nlc_done && !bypass_asar;

  // ---------------- packetizer and output SPI ----------------
  sample_t     pk_samples [NCH];
  logic        pk_start;
  logic [15:0] pk_word;
  logic        pk_valid, pk_last, pk_ready, pk_busy;

  always_comb begin
    pk_start   = bypass_asar ? nlc_done : asar_out_valid;
    pk_samples = bypass_asar ? nlc_y    : asar_out;
  end

  frame_packetizer #(.NCH(NCH)) u_pkt (
    .clk, .rst_n, .start(pk_start), .samples(pk_samples), .ch_en,
    .word(pk_word), .valid(pk_valid), .last(pk_last), .ready(pk_ready),
    .overflow_cnt, .busy(pk_busy)
  );

  spi_stream_tx u_tx (
    .clk, .rst_n, .word(pk_word), .valid(pk_valid), .last(pk_last), .ready(pk_ready),
    .sclk(dout_sclk), .cs_n(dout_cs_n), .mosi(dout_mosi)
  );

  assign frame_start = pk_start;

  logic all_phv;
  always_comb begin
    all_phv = 1'b1;
    for (int c = 0; c < NCH; c++) all_phv &= fe_phv[c];
    status = {13'd0, pk_busy, all_phv, nlc_busy, overflow_cnt};
  end

endmodule
