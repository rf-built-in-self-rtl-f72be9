// tb_gsm_deviation: the GSM-like modulation example at full size. One test
// tone at 100 kHz with amplitude x_a(0) = FS/2 and mod_amp = 43664 gives a
// modulation amplitude D = mod_amp * 0.5 / 2 = 10916 in the 22-bit
// fractional word, i.e. a deviation of 10916/2^22 * 26 MHz = 67.7 kHz
// (modulation index 0.68) before the loop's low-pass. The carrier is at
// (153 + 0.1234) * 26 MHz; the behavioural PLL has |G(100 kHz)| = 1/2.
// A channel fraction of exactly 1/2 is avoided on purpose: there both
// first-order quantizers (fractional-N modulator and SDFD) sit on their
// strongest idle pattern, the small tone intermodulates with it, and the
// estimate comes out several times too high (about 4.5x measured).
// The bandpass is tuned to 100 kHz with a narrow k_bw (24/4096).
// Checks:
//   - the deviation actually applied, from the generator's bit stream
//     (correlation at the tone frequency), is 67.7 kHz within 15 %;
//   - the amplitude estimate matches 256 * 2/pi * 2 * delta * 1024 *
//     |H_CIC| (delta = applied deviation / f_ref * |G|) within 25 %;
//   - it is at least 3 times the estimate with the tone switched off
//     (mod_amp = 0), the measurement floor of this setup.
`timescale 1ps/1fs
module tb_gsm_deviation;
  import bist_pkg::*;
  localparam int NCH = 153;
  localparam real FREF = 26.0e6, TREF = 1.0e12 / FREF, PI = 3.14159265358979;
  localparam real BW = 100.0e3;
  localparam int SETTLE = 8;

  logic clk = 0, rst_n = 0, te = 1, gen_load = 0, rf_clk;
  logic signed [WF-1:0] tx_data = '0;
  logic [NI_W-1:0] chan_int = NI_W'(NCH);
  logic [WF-1:0] chan_frac = WF'(int'(0.1234 * 2.0 ** WF));
  tone_cfg_t gen_cfg [GEN_L];
  logic [WF-1:0] mod_amp = WF'(43664);
  logic [KF_W-1:0] bp_kf;
  logic [KBW_W-1:0] bp_kbw = 9'd24;
  logic pll_div_out, pll_mod, demod, amp_valid;
  logic [NI_W-1:0] pll_n;
  logic [AMP_W-1:0] amp;
  real ratio;
  int checks = 0, failures = 0;

  bist_top dut (.*);
  pll_model #(.F_REF(FREF), .BW_HZ(BW)) u_pll (
    .ref_clk(clk), .n(pll_n), .mod(pll_mod), .init_ratio(NCH + 0.1234), .rf_clk(rf_clk), .ratio(ratio));

  always #(TREF / 2.0) clk = ~clk;

  initial begin
    #(TREF * 8192.0 * (2 * SETTLE + 6));
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ftone, wt, ci = 0, cq = 0;
  int  nc = 0;
  bit  win = 0;
  always @(posedge clk) if (win && dut.u_gen.tone == 1'b0) begin
    ci += (dut.u_gen.xd ? 1.0 : -1.0) * $cos(wt * nc);
    cq += (dut.u_gen.xd ? 1.0 : -1.0) * $sin(wt * nc);
    nc++;
  end

  task automatic measure(output real a);
    repeat (SETTLE) @(posedge clk iff amp_valid);
    ci = 0; cq = 0; nc = 0; win = 1;
    @(posedge clk iff amp_valid);
    win = 0;
    a = $itor(amp);
  endtask

  initial begin
    real a_on, a_off, tamp, dev, delta, e, g, hc, fr;
    int b;
    b = 4896;
    gen_cfg[0].b = 14'(b); gen_cfg[0].xa0 = GEN_W'(8192);
    gen_cfg[1].b = 14'd4000; gen_cfg[1].xa0 = '0;
    ftone = $acos(1.0 - (1.0 / 32.0) * ($itor(b) / 65536.0) / 2.0) * FREF / GEN_L / (2.0 * PI);
    wt = 2.0 * PI * ftone / (FREF / GEN_L);
    bp_kf = KF_W'(int'(1024.0 * $sin(PI * ftone / (FREF / 32.0))));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk) gen_load = 1;
    @(negedge clk) gen_load = 0;
    measure(a_on);
    tamp = 2.0 * $sqrt(ci ** 2 + cq ** 2) / nc;
    dev = $itor(mod_amp) * tamp / GEN_L / 2.0 ** WF * FREF;
    g = 1.0 / (1.0 + (ftone / BW) ** 2);
    fr = ftone / FREF;
    hc = ($sin(PI * fr * 32) / (32.0 * $sin(PI * fr))) ** 2;
    delta = dev / FREF * g;
    e = 256.0 * 2.0 / PI * 2.0 * delta * 1024.0 * hc;
    $display("tone %0.1f Hz, stream amplitude %0.4f, applied deviation %0.1f kHz (index %0.2f)",
             ftone, tamp, dev / 1000.0, dev / ftone);
    checks++;
    if (dev < 0.85 * 67.7e3 || dev > 1.15 * 67.7e3) begin failures++; $display("FAIL deviation"); end
    $display("estimate with tone %0.0f, predicted %0.0f", a_on, e);
    checks++;
    if (a_on < 0.75 * e || a_on > 1.25 * e) begin failures++; $display("FAIL estimate"); end
    @(negedge clk) mod_amp = '0;
    measure(a_off);
    $display("estimate without tone %0.0f (ratio %0.1f dB)", a_off, 20.0 * $log10(a_on / (a_off + 1.0)));
    checks++;
    if (a_on < 3.0 * a_off) begin failures++; $display("FAIL tone not above floor"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
