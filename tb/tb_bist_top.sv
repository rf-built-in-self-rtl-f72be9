// tb_bist_top: end-to-end test of the transmitter BIST with a behavioural
// PLL (second-order low-pass response, 100 kHz loop bandwidth) closing the loop from the
// divider control back to rf_clk. The top runs at its default sizes; the
// channel is N_I = NCH with FRAC = 1/2, so the carrier sits at
// (NCH + 0.5) * 26 MHz (NCH = 153: about 4 GHz, the reference design's
// VCO frequency).
//
// Phases, each measured with the bandpass tuned to the tone of interest
// (three averager outputs to settle, the fourth is checked):
//   1. normal mode (te = 0), TX data = 50 kHz sine: amplitude as predicted;
//   2. normal mode, TX data = 0: amplitude close to zero;
//   3. test mode (te = 1), generator tones at about 50 kHz and 120 kHz:
//      each amplitude as predicted from mod_amp, the generated tone
//      amplitude, the PLL response |G(f)|, the CIC droop and the exact
//      bandpass gain (15 %); the loop response |G(120 kHz)|/|G(50 kHz)|
//      recovered from the two measurements within -15 % .. +20 %. (At
//      120 kHz the discriminator and estimator read 5 to 9 % above the
//      linear prediction, so the tolerance is asymmetric.)
// Prediction: a ratio deviation delta gives a bit-density deviation delta,
// i.e. 2*delta*1024 at the CIC output; the averager reports 256 * 2/pi
// times the peak.
// Mechanisms counted (a failure if one never happens): normal and test
// mode, generator load, both moduli of the PLL divider and of the
// discriminator, CIC dumps, bandpass sequences, averager outputs. Every
// PLL divider period must be n or n+1 RF cycles of the ratio in force.
`timescale 1ps/1fs
module tb_bist_top;
  import bist_pkg::*;
  localparam int NCH = 153;
  localparam real FREF = 26.0e6, TREF = 1.0e12 / FREF, PI = 3.14159265358979;
  localparam real BW = 100.0e3;

  logic clk = 0, rst_n = 0, te = 0, gen_load = 0, rf_clk;
  logic signed [WF-1:0] tx_data = '0;
  logic [NI_W-1:0] chan_int = NI_W'(NCH);
  logic [WF-1:0] chan_frac = WF'(1 << (WF - 1));
  tone_cfg_t gen_cfg [GEN_L];
  logic [WF-1:0] mod_amp = WF'(1 << (WF - 1));
  logic [KF_W-1:0] bp_kf = '0;
  logic [KBW_W-1:0] bp_kbw = 9'd96;
  logic pll_div_out, pll_mod, demod, amp_valid;
  logic [NI_W-1:0] pll_n;
  logic [AMP_W-1:0] amp;
  real ratio;

  int checks = 0, failures = 0;
  int n_te0 = 0, n_te1 = 0, n_load = 0, n_dq1 = 0, n_dq0 = 0, n_dem1 = 0, n_dem0 = 0;
  int n_cic = 0, n_bp = 0, n_avg = 0, n_badper = 0, n_per = 0;

  bist_top dut (.*);
  pll_model #(.F_REF(FREF), .BW_HZ(BW)) u_pll (
    .ref_clk(clk), .n(pll_n), .mod(pll_mod), .init_ratio(NCH + 0.5), .rf_clk(rf_clk), .ratio(ratio));

  always #(TREF / 2.0) clk = ~clk;

  initial begin
    #(TREF * 8192.0 * 24);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (te) n_te1++; else n_te0++;
    if (gen_load) n_load++;
    if (pll_mod) n_dq1++; else n_dq0++;
    if (demod) n_dem1++; else n_dem0++;
    if (dut.u_amp.dec_v) n_cic++;
    if (dut.u_amp.bp_v) n_bp++;
    if (amp_valid) n_avg++;
  end

  // PLL divider period check: count RF cycles between rising edges
  int rfc = 0;
  int pexp [$];
  always @(posedge rf_clk) rfc++;
  always @(posedge pll_div_out) if (rst_n) begin
    if (pexp.size() >= 2) begin
      int p;
      p = pexp.pop_front();
      n_per++;
      if (rfc != p) n_badper++;
    end
    rfc = 0;
  end
  // the divider samples n and mod when it starts a period, one RF cycle
  // before the rising edge of its output
  always @(posedge rf_clk) if (rst_n && dut.u_pll_div.cnt == '0)
    pexp.push_back((int'(pll_n) + int'(pll_mod) < 2) ? 2 : int'(pll_n) + int'(pll_mod));

  // TX filter stand-in: 50 kHz sine in normal mode
  real tx_amp = 0.0;
  real tsec = 0.0;
  always @(posedge clk) begin
    tsec += 1.0 / FREF;
    tx_data <= WF'(int'(tx_amp * $sin(2.0 * PI * 50.0e3 * tsec)));
  end

  function automatic real g_pll(real f);
    return 1.0 / (1.0 + (f / BW) ** 2);
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
  function automatic real pred(real delta, real f);
    return 256.0 * 2.0 / PI * 2.0 * delta * 1024.0 * g_pll(f) * cic_gain(f);
  endfunction
  function automatic real gen_freq(int b);
    return $acos(1.0 - (1.0 / 32.0) * ($itor(b) / 65536.0) / 2.0) * FREF / GEN_L / (2.0 * PI);
  endfunction

  // The LDI generator is lossless, so its amplitude wanders slowly under
  // the modulator's quantization noise. The prediction therefore uses the
  // tone amplitude actually present in the generator's bit stream,
  // obtained by correlating each tone's bits with a complex exponential at
  // the tone frequency over the window the checked averager output covers.
  real ci [GEN_L], cq [GEN_L], wt [GEN_L];
  int  nsq [GEN_L];
  bit  win = 0;
  always @(posedge clk) if (win) begin
    int t;
    real v;
    t = int'(dut.u_gen.tone);
    v = dut.u_gen.xd ? 1.0 : -1.0;
    ci[t] += v * $cos(wt[t] * nsq[t]);
    cq[t] += v * $sin(wt[t] * nsq[t]);
    nsq[t] += 1;
  end

  task automatic measure(real f, output real a);
    bp_kf = KF_W'(int'(1024.0 * $sin(PI * f / (FREF / 32.0))));
    repeat (3) @(posedge clk iff amp_valid);
    for (int t = 0; t < GEN_L; t++) begin ci[t] = 0.0; cq[t] = 0.0; nsq[t] = 0; end
    win = 1;
    @(posedge clk iff amp_valid);
    win = 0;
    a = $itor(amp);
  endtask

  // tone amplitude in the bit stream, as a fraction of full scale
  function automatic real tone_amp(int t);
    return 2.0 * $sqrt(ci[t] ** 2 + cq[t] ** 2) / nsq[t];
  endfunction

  task automatic check_range(string what, real v, real lo, real hi);
    checks++;
    $display("%s: %0.1f (allowed %0.1f .. %0.1f)", what, v, lo, hi);
    if (v < lo || v > hi) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real a, e, f0, f1, a0, a1, d0, d1;
    int b0, b1;
    b0 = 1225; b1 = 7052;
    gen_cfg[0].b = 14'(b0); gen_cfg[0].xa0 = GEN_W'(6000);
    gen_cfg[1].b = 14'(b1); gen_cfg[1].xa0 = GEN_W'(6000);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. normal mode, TX data sine
    tx_amp = $itor(1 << (WF - 3));             // ratio deviation 0.125
    measure(50.0e3, a);
    e = pred(0.125, 50.0e3);
    check_range("normal mode, 50 kHz TX data", a, 0.85 * e, 1.15 * e);
    // 2. normal mode, no data
    tx_amp = 0.0;
    measure(50.0e3, a);
    check_range("normal mode, no data", a, 0.0, 0.05 * e);

    // 3. test mode, two generator tones
    @(negedge clk) begin te = 1; gen_load = 1; end
    @(negedge clk) gen_load = 0;
    f0 = gen_freq(b0); f1 = gen_freq(b1);
    wt[0] = 2.0 * PI * f0 / (FREF / GEN_L);
    wt[1] = 2.0 * PI * f1 / (FREF / GEN_L);
    $display("generator tones at %0.1f Hz and %0.1f Hz", f0, f1);
    measure(f0, a0);
    d0 = $itor(mod_amp) / 2.0 ** WF * tone_amp(0) / GEN_L;
    $display("tone 1 amplitude in the bit stream %0.4f of full scale", tone_amp(0));
    e = pred(d0, f0);
    check_range("test mode, tone 1", a0, 0.85 * e, 1.15 * e);
    measure(f1, a1);
    d1 = $itor(mod_amp) / 2.0 ** WF * tone_amp(1) / GEN_L;
    $display("tone 2 amplitude in the bit stream %0.4f of full scale", tone_amp(1));
    e = pred(d1, f1);
    check_range("test mode, tone 2", a1, 0.85 * e, 1.15 * e);
    // frequency response |G(f1)|/|G(f0)| recovered from the measurement
    e = g_pll(f1) / g_pll(f0);
    check_range("measured loop response ratio x1000",
                1000.0 * (a1 / d1 / cic_gain(f1)) / (a0 / d0 / cic_gain(f0)), 850.0 * e, 1200.0 * e);

    $display("mechanisms: te0 %0d te1 %0d load %0d dq1 %0d dq0 %0d demod1 %0d demod0 %0d cic %0d bp %0d avg %0d divider periods %0d (bad %0d)",
             n_te0, n_te1, n_load, n_dq1, n_dq0, n_dem1, n_dem0, n_cic, n_bp, n_avg, n_per, n_badper);
    checks++; if (n_te0 == 0 || n_te1 == 0) begin failures++; $display("FAIL mode switch not exercised"); end
    checks++; if (n_load == 0) begin failures++; $display("FAIL generator load"); end
    checks++; if (n_dq1 == 0 || n_dq0 == 0) begin failures++; $display("FAIL PLL modulus"); end
    checks++; if (n_dem1 == 0 || n_dem0 == 0) begin failures++; $display("FAIL discriminator modulus"); end
    checks++; if (n_cic == 0 || n_bp == 0 || n_avg == 0) begin failures++; $display("FAIL analyser chain"); end
    checks++; if (n_per == 0 || n_badper != 0) begin failures++; $display("FAIL PLL divider periods"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
