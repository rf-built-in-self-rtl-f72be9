// tb_sdm2_tdm: self-checking test of the shared second-order sigma-delta
// modulator. Two interleaved channels get constant inputs of +0.3 and
// -0.55 of full scale. Per channel the testbench checks that the running
// error sum(xd*FS - x) stays bounded (the modulator is stable and tracks
// its input) and that the bit density over the run equals x/FS within
// 0.5 %. A final phase swaps in a slow sine on channel 0 and checks the
// same bound.
`timescale 1ns/1ps
module tb_sdm2_tdm;
  localparam int W = 15, L = 2, FS = 1 << (W - 1);
  localparam int NCYC = 40000;
  logic clk = 0, rst_n = 0, clr = 0, xd;
  logic signed [W-1:0] x;
  int checks = 0, failures = 0;
  int slot = 0;

  sdm2_tdm #(.W(W), .L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10.0 * (3 * NCYC + 100));
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int chan_val(int ch, int n, bit sine);
    if (sine && ch == 0) return int'(0.6 * FS * $sin(2.0 * 3.14159265 * n / 700.0));
    return (ch == 0) ? int'(0.3 * FS) : int'(-0.55 * FS);
  endfunction

  task automatic run(bit sine);
    longint err [L];
    longint maxerr [L];
    int ones [L];
    int lastx [L];
    for (int c = 0; c < L; c++) begin err[c] = 0; maxerr[c] = 0; ones[c] = 0; lastx[c] = 0; end
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    slot = 0;
    for (int n = 0; n < NCYC; n++) begin
      int ch;
      ch = n % L;
      x = W'(chan_val(ch, n / L, sine));
      #1;
      // xd codes this channel's earlier input (one-sample delay)
      if (n >= L) begin
        err[ch] += (xd ? FS : -FS) - lastx[ch];
        if (err[ch] > maxerr[ch]) maxerr[ch] = err[ch];
        if (-err[ch] > maxerr[ch]) maxerr[ch] = -err[ch];
        ones[ch] += xd;
      end
      lastx[ch] = int'(x);
      @(negedge clk);
    end
    for (int c = 0; c < L; c++) begin
      real dens, expd;
      checks++;
      if (maxerr[c] > 4 * FS) begin
        failures++; $display("FAIL channel %0d running error %0d", c, maxerr[c]);
      end
      if (!sine) begin
        dens = 2.0 * ones[c] / (NCYC / L - 1) - 1.0;
        expd = $itor(chan_val(c, 0, 0)) / FS;
        $display("channel %0d: density %0.4f expected %0.4f, max error %0d", c, dens, expd, maxerr[c]);
        checks++;
        if (dens - expd > 0.005 || expd - dens > 0.005) begin
          failures++; $display("FAIL channel %0d density", c);
        end
      end
    end
  endtask

  initial begin
    x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
