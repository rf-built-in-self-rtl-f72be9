// tb_sdfd: checks the sigma-delta frequency discriminator with an ideal
// reference (26 MHz square wave) and an RF clock at (N + p) * f_ref for
// several fractional parts p. Over M reference periods the number of ones
// in the bit stream must be p*M within 2 (first-order sigma-delta coding of
// the frequency), and the divider must deliver exactly one rising edge per
// reference period once settled.
`timescale 1ps/1fs
module tb_sdfd;
  localparam int NW = 8;
  localparam realtime TREF = 38461.538;   // 26 MHz
  localparam int N = 12;
  localparam int M = 2000;
  logic clk_rf = 0, ref_in = 0, rst_n = 0, demod, div_out;
  logic [NW-1:0] n_int = NW'(N);
  realtime trf_half = TREF / (2.0 * (N + 0.5));
  int checks = 0, failures = 0;
  int ndiv = 0;

  sdfd #(.NW(NW)) dut (.*);

  always #(TREF / 2.0) ref_in = ~ref_in;
  always #(trf_half) clk_rf = ~clk_rf;
  always @(posedge div_out) ndiv++;

  initial begin
    #(TREF * (M + 400) * 5);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ps [4];
    ps[0] = 0.5; ps[1] = 0.1; ps[2] = 0.77; ps[3] = 0.93;
    #(TREF * 3) rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      int ones, d0, bad;
      trf_half = TREF / (2.0 * (N + ps[t]));
      repeat (100) @(posedge ref_in);   // settle
      ones = 0; bad = 0;
      for (int m = 0; m < M; m++) begin
        d0 = ndiv;
        @(posedge ref_in);
        ones += demod;
        if (ndiv - d0 != 1) bad++;
      end
      $display("p = %0.2f: %0d ones in %0d periods (expected %0.1f), %0d periods without one divider edge",
               ps[t], ones, M, ps[t] * M, bad);
      checks++;
      if ($itor(ones) > ps[t] * M + 2.0 || $itor(ones) < ps[t] * M - 2.0) begin
        failures++; $display("FAIL density at p = %0.2f", ps[t]);
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL divider edges at p = %0.2f", ps[t]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
