// tb_bw_fault: parametric loop-bandwidth faults seen by the two-tone
// measurement. Two copies of the full-size top run side by side, each
// closing its own behavioural PLL: one whose loop bandwidth has dropped to
// 50 kHz and one whose bandwidth has grown to 200 kHz (the healthy loop is
// 100 kHz, tested in tb_bist_top). Both get the same stimulus: test mode,
// generator tones at about 50 kHz and 120 kHz, carrier (153 + 1/2) * 26 MHz.
// The bandpass is tuned to each tone in turn (three averager outputs to
// settle, the fourth is used) and the loop response ratio
//   R = |G(120 kHz)| / |G(50 kHz)|
// is recovered from the two estimates exactly as in tb_bist_top.
// Checks, for each faulty loop:
//   - R lies outside the window tb_bist_top accepts for the healthy loop
//     (0.85 .. 1.2 times the healthy 0.51), so the fault is detected;
//   - R matches the faulty loop's own |G| ratio within -15 % .. +20 %.
`timescale 1ps/1fs
module tb_bw_fault;
  import bist_pkg::*;
  localparam int NCH = 153;
  localparam real FREF = 26.0e6, TREF = 1.0e12 / FREF, PI = 3.14159265358979;
  localparam real BW_OK = 100.0e3;
  localparam real BW_NARROW = 50.0e3, BW_WIDE = 200.0e3;

  logic clk = 0, rst_n = 0, te = 1, gen_load = 0;
  logic signed [WF-1:0] tx_data = '0;
  logic [NI_W-1:0] chan_int = NI_W'(NCH);
  logic [WF-1:0] chan_frac = WF'(1 << (WF - 1));
  tone_cfg_t gen_cfg [GEN_L];
  logic [WF-1:0] mod_amp = WF'(1 << (WF - 1));
  logic [KF_W-1:0] bp_kf = '0;
  logic [KBW_W-1:0] bp_kbw = 9'd96;

  // copy 0: narrow loop, copy 1: wide loop
  logic rf_clk [2], pll_div_out [2], pll_mod [2], demod [2], amp_valid [2];
  logic [NI_W-1:0] pll_n [2];
  logic [AMP_W-1:0] amp [2];
  real ratio [2];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 2; i++) begin : g_copy
    bist_top dut (
      .clk, .rst_n, .rf_clk(rf_clk[i]), .te, .tx_data, .chan_int, .chan_frac,
      .gen_load, .gen_cfg, .mod_amp, .bp_kf, .bp_kbw,
      .pll_div_out(pll_div_out[i]), .pll_mod(pll_mod[i]), .pll_n(pll_n[i]),
      .demod(demod[i]), .amp(amp[i]), .amp_valid(amp_valid[i]));
    pll_model #(.F_REF(FREF), .BW_HZ(i == 0 ? BW_NARROW : BW_WIDE)) u_pll (
      .ref_clk(clk), .n(pll_n[i]), .mod(pll_mod[i]), .init_ratio(NCH + 0.5),
      .rf_clk(rf_clk[i]), .ratio(ratio[i]));
  end

  always #(TREF / 2.0) clk = ~clk;

  initial begin
    #(TREF * 8192.0 * 14);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real g_pll(real f, real bw);
    return 1.0 / (1.0 + (f / bw) ** 2);
  endfunction
  // CIC droop times the exact gain of the two bandpass sections at f, with
  // the bandpass tuned to f as measure() does. Per section
  //   H(z) = k_bw / (z - 1 + k_bw + k_f^2 / (1 - z^-1)),
  // whose peak is close to, but not exactly, 1 (about 0.98 at 50 kHz and
  // 1.04 at 120 kHz for kbw = 96).
  function automatic real cic_gain(real f);
    real fr, w, c, s, m, kf, kbw, dr, di;
    fr = f / FREF;
    kf = $floor(1024.0 * $sin(PI * f / (FREF / 32.0)) + 0.5) / 512.0;
    kbw = $itor(bp_kbw) / 4096.0;
    w = 2.0 * PI * f / (FREF / 32.0);
    c = $cos(w); s = $sin(w);
    m = (1.0 - c) ** 2 + s ** 2;
    dr = c - 1.0 + kbw + kf * kf * (1.0 - c) / m;
    di = s - kf * kf * s / m;
    return ($sin(PI * fr * 32) / (32.0 * $sin(PI * fr))) ** 2 * kbw * kbw / (dr * dr + di * di);
  endfunction
  function automatic real gen_freq(int b);
    return $acos(1.0 - (1.0 / 32.0) * ($itor(b) / 65536.0) / 2.0) * FREF / GEN_L / (2.0 * PI);
  endfunction

  // Tone amplitudes actually present in the generator's bit stream (the
  // generator is lossless, so they wander slowly); both copies produce the
  // same stream, so copy 0 is observed.
  real ci [GEN_L], cq [GEN_L], wt [GEN_L];
  int  nsq [GEN_L];
  bit  win = 0;
  always @(posedge clk) if (win) begin
    int t;
    real v;
    t = int'(g_copy[0].dut.u_gen.tone);
    v = g_copy[0].dut.u_gen.xd ? 1.0 : -1.0;
    ci[t] += v * $cos(wt[t] * nsq[t]);
    cq[t] += v * $sin(wt[t] * nsq[t]);
    nsq[t] += 1;
  end

  function automatic real tone_amp(int t);
    return 2.0 * $sqrt(ci[t] ** 2 + cq[t] ** 2) / nsq[t];
  endfunction

  // both copies share clock and reset, so their estimates are simultaneous
  task automatic measure(real f, output real a [2]);
    bp_kf = KF_W'(int'(1024.0 * $sin(PI * f / (FREF / 32.0))));
    repeat (3) @(posedge clk iff amp_valid[0]);
    for (int t = 0; t < GEN_L; t++) begin ci[t] = 0.0; cq[t] = 0.0; nsq[t] = 0; end
    win = 1;
    @(posedge clk iff amp_valid[0]);
    win = 0;
    for (int i = 0; i < 2; i++) a[i] = $itor(amp[i]);
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real a0 [2], a1 [2];
    real f0, f1, d0, d1, r, r_ok, r_bad, bw;
    int b0, b1;
    b0 = 1225; b1 = 7052;
    gen_cfg[0].b = 14'(b0); gen_cfg[0].xa0 = GEN_W'(6000);
    gen_cfg[1].b = 14'(b1); gen_cfg[1].xa0 = GEN_W'(6000);
    f0 = gen_freq(b0); f1 = gen_freq(b1);
    wt[0] = 2.0 * PI * f0 / (FREF / GEN_L);
    wt[1] = 2.0 * PI * f1 / (FREF / GEN_L);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk) gen_load = 1;
    @(negedge clk) gen_load = 0;
    measure(f0, a0);
    d0 = tone_amp(0);
    measure(f1, a1);
    d1 = tone_amp(1);
    r_ok = g_pll(f1, BW_OK) / g_pll(f0, BW_OK);
    $display("tones %0.1f Hz and %0.1f Hz; healthy-loop window %0.3f .. %0.3f",
             f0, f1, 0.85 * r_ok, 1.2 * r_ok);
    for (int i = 0; i < 2; i++) begin
      bw = i == 0 ? BW_NARROW : BW_WIDE;
      r = (a1[i] / d1 / cic_gain(f1)) / (a0[i] / d0 / cic_gain(f0));
      r_bad = g_pll(f1, bw) / g_pll(f0, bw);
      $display("loop bandwidth %0.0f kHz: estimates %0.0f and %0.0f, response ratio %0.3f (expected %0.3f)",
               bw / 1000.0, a0[i], a1[i], r, r_bad);
      check($sformatf("%0.0f kHz loop not detected", bw / 1000.0), r < 0.85 * r_ok || r > 1.2 * r_ok);
      check($sformatf("%0.0f kHz loop response", bw / 1000.0), r > 0.85 * r_bad && r < 1.2 * r_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
