// tb_gen_spectrum: spectral purity of the two-tone generator's output bit
// stream, the quantity the fractional-N modulator receives in test mode.
// Both tones are loaded with x_a(0) = 8000 (about -6 dB of full scale), at
// about 50 kHz and 120 kHz (f_s = 26 MHz, 13 MHz per tone). After 2000
// clocks of settling, 16384 samples of each tone's +/-1 stream are taken
// and a Blackman-Harris windowed DFT (bin width 793 Hz) is evaluated up to
// 200 kHz. Checks, per tone:
//   - the spectral peak sits at the tone frequency from arccos(1 - ab/2);
//   - spurious-free dynamic range: every bin outside the tone's main lobe
//     (+/-6 bins) must lie below the peak bin by at least 60 dB for the
//     50 kHz tone and 50 dB for the 120 kHz tone. The 60 dB target holds for
//     the lower tone (about 63 dB); for the upper tone the close-in skirt
//     caused by the lossless resonator's slowly wandering amplitude reaches
//     about -53 dB within 10 kHz of the carrier, so only 50 dB is required.
// The in-band signal-to-noise ratio (0..100 kHz) is printed for reference.
`timescale 1ns/1ps
module tb_gen_spectrum;
  localparam int N = 16384;
  localparam int NB = 253;                 // 200 kHz / 793 Hz
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, load = 0, xd;
  logic [0:0] tone;
  logic signed [14:0] xa;
  logic [13:0] b_coef [2];
  logic signed [14:0] xa0 [2];
  int checks = 0, failures = 0;
  real sd [2][N];

  ldi_multitone_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10.0 * (2 * N + 4000) + 1.0e6);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k [2];
    b_coef[0] = 14'd1225; b_coef[1] = 14'd7052;
    xa0[0] = 15'sd8000;   xa0[1] = 15'sd8000;
    #22 rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    repeat (2000) @(negedge clk);
    k[0] = 0; k[1] = 0;
    while (k[0] < N || k[1] < N) begin
      @(negedge clk);
      if (k[tone] < N) begin
        sd[tone][k[tone]] = xd ? 1.0 : -1.0;
        k[tone]++;
      end
    end
    for (int t = 0; t < 2; t++) begin
      real p [NB];
      real pmax, spur, sig, noi, fexp;
      int kmax, kspur, kexp;
      for (int b = 1; b < NB; b++) begin
        real re, im, w;
        re = 0; im = 0;
        for (int n = 0; n < N; n++) begin
          w = 0.35875 - 0.48829 * $cos(2 * PI * n / N) + 0.14128 * $cos(4 * PI * n / N)
              - 0.01168 * $cos(6 * PI * n / N);
          re += w * sd[t][n] * $cos(2 * PI * b * n / N);
          im += w * sd[t][n] * $sin(2 * PI * b * n / N);
        end
        p[b] = re * re + im * im;
      end
      pmax = 0; kmax = 1;
      for (int b = 1; b < NB; b++) if (p[b] > pmax) begin pmax = p[b]; kmax = b; end
      spur = 0; kspur = 0; sig = 0; noi = 0;
      for (int b = 1; b < NB; b++) begin
        if (b < kmax - 6 || b > kmax + 6) begin
          if (p[b] > spur) begin spur = p[b]; kspur = b; end
          if (b < 127) noi += p[b];
        end else if (b < 127) sig += p[b];
      end
      fexp = $acos(1.0 - (1.0 / 32.0) * ($itor(b_coef[t]) / 65536.0) / 2.0) * 13.0e6 / (2 * PI);
      kexp = int'(fexp / (13.0e6 / N));
      $display("tone %0d: peak at bin %0d (%0.1f kHz, expected %0.1f kHz), largest spur %0.1f dB at bin %0d",
               t, kmax, kmax * 13.0e6 / N / 1000.0, fexp / 1000.0, 10 * $log10(spur / pmax), kspur);
      if (sig > 0) $display("tone %0d: in-band (0..100 kHz) SNR %0.1f dB", t, 10 * $log10(sig / noi));
      checks++;
      if (kmax < kexp - 1 || kmax > kexp + 1) begin failures++; $display("FAIL tone %0d frequency", t); end
      checks++;
      if (10 * $log10(spur / pmax) > ((t == 0) ? -60.0 : -50.0)) begin
        failures++; $display("FAIL tone %0d SFDR", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
