// tb_ldi_multitone_gen: self-checking test of the two-tone LDI generator.
// Two tones are loaded with different b coefficients and amplitudes. For
// each tone the testbench measures, from the generator's x_a output:
//   - the peak amplitude, expected x_a(0) within -10 % .. +15 % (the
//     resonator is lossless, so the modulator's shaped quantization noise
//     lets the amplitude wander slightly);
//   - the period from zero crossings, expected 2*pi / arccos(1 - ab/2)
//     tone samples within 2 %;
//   - that the single-bit stream carries the tone: the average of
//     xd * x_a must match mean(x_a^2)/FS within 10 %.
`timescale 1ns/1ps
module tb_ldi_multitone_gen;
  localparam int W = 15, L = 2, ALPHA = 5, BC_W = 14;
  localparam int NCYC = 60000;
  logic clk = 0, rst_n = 0, load = 0;
  logic [BC_W-1:0] b_coef [L];
  logic signed [W-1:0] xa0 [L];
  logic xd;
  logic [0:0] tone;
  logic signed [W-1:0] xa;
  int checks = 0, failures = 0;

  ldi_multitone_gen #(.W(W), .L(L), .ALPHA(ALPHA), .BC_W(BC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10.0 * (NCYC + 5000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real peak [L], corr [L], pw [L];
  int  zc [L], first_zc [L], last_zc [L], nsamp [L], ncorr [L];
  logic signed [W-1:0] prev [L];

  initial begin
    real a, b, w_exp, per_exp, per_meas, fs;
    b_coef[0] = 14'd1200; xa0[0] = 15'sd5000;
    b_coef[1] = 14'd6000; xa0[1] = 15'sd3000;
    for (int t = 0; t < L; t++) begin
      peak[t] = 0; corr[t] = 0; pw[t] = 0; zc[t] = 0; nsamp[t] = 0;
      first_zc[t] = -1; last_zc[t] = -1; prev[t] = 0; ncorr[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); load <= 1;
    @(posedge clk); load <= 0;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      begin
        int t;
        t = int'(tone);
        if ($itor(xa) > peak[t]) peak[t] = $itor(xa);
        if (-$itor(xa) > peak[t]) peak[t] = -$itor(xa);
        if (prev[t] < 0 && xa >= 0) begin
          if (first_zc[t] < 0) first_zc[t] = nsamp[t];
          else begin last_zc[t] = nsamp[t]; zc[t]++; end
        end
        // xd of this clock codes the tone's previous x_a sample
        if (first_zc[t] >= 0 && (last_zc[t] < 0 || nsamp[t] > 0)) begin
          corr[t] += (xd ? 1.0 : -1.0) * $itor(prev[t]);
          pw[t]   += $itor(prev[t]) * $itor(prev[t]) / 16384.0;
          ncorr[t]++;
        end
        prev[t] = xa;
        nsamp[t]++;
      end
    end
    for (int t = 0; t < L; t++) begin
      a = 1.0 / (1 << ALPHA);
      b = $itor(b_coef[t]) / 65536.0;
      w_exp = $acos(1.0 - a * b / 2.0);
      per_exp = 2.0 * 3.14159265358979 / w_exp;
      per_meas = $itor(last_zc[t] - first_zc[t]) / $itor(zc[t]);
      fs = 26.0e6 / L;
      $display("tone %0d: peak %0.1f (x_a(0) %0d), period %0.2f samples expected %0.2f (%0.1f kHz at 26 MHz)",
               t, peak[t], xa0[t], per_meas, per_exp, fs / per_exp / 1000.0);
      checks++;
      if (peak[t] < 0.9 * $itor(xa0[t]) || peak[t] > 1.15 * $itor(xa0[t])) begin
        failures++; $display("FAIL amplitude tone %0d", t);
      end
      checks++;
      if (zc[t] < 5 || per_meas < 0.98 * per_exp || per_meas > 1.02 * per_exp) begin
        failures++; $display("FAIL period tone %0d", t);
      end
      checks++;
      $display("tone %0d: <xd*xa> %0.2f expected %0.2f", t, corr[t] / ncorr[t], pw[t] / ncorr[t]);
      if (corr[t] / ncorr[t] < 0.9 * pw[t] / ncorr[t] || corr[t] / ncorr[t] > 1.1 * pw[t] / ncorr[t]) begin
        failures++; $display("FAIL bit stream tone %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
