// tb_ldi_bp4: checks the shared-multiplier fourth-order LDI bandpass.
// With k_f = 256/512 the centre is f_c = f_sR/pi * asin(k_f/2) (65.3 kHz
// at f_sR = 812.5 kHz). Sines of amplitude 800 are applied one sample per
// 32 clocks, as from the decimator:
//   - at f_c the settled output amplitude must be 800 within 15 %;
//   - at 1.4 f_c and 0.6 f_c it must be below 5 % of that (4th order);
//   - the output must also track an ideal floating-point model of the same
//     two difference equations within 2 output LSBs plus 1 %;
//   - y_valid must come exactly 7 clocks after each x_valid.
`timescale 1ns/1ps
module tb_ldi_bp4;
  localparam int IW = 12, OW = 14;
  localparam int NS = 3000;   // samples per tone
  logic clk = 0, rst_n = 0, x_valid = 0, y_valid;
  logic signed [IW-1:0] x = '0;
  logic [8:0] kf = 9'd256, kbw = 9'd40;
  logic signed [OW-1:0] y;
  int checks = 0, failures = 0;

  ldi_bp4 #(.IW(IW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10.0 * 32 * NS * 3 * 1.2 + 10000);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real my [2], ms [2];   // ideal model state

  task automatic model_step(real xin);
    real u, k1, k2;
    k1 = $itor(kf) / 512.0; k2 = $itor(kbw) / 4096.0;
    u = my[0];
    ms[1] += k1 * my[1];
    my[1] += k2 * (u - my[1]) - k1 * ms[1];
    ms[0] += k1 * my[0];
    my[0] += k2 * (xin - my[0]) - k1 * ms[0];
  endtask

  task automatic tone(real fr, output real peak, output real maxdev);
    real w;
    w = 2.0 * $asin($itor(kf) / 1024.0) * fr;   // rad per sample
    peak = 0; maxdev = 0;
    for (int n = 0; n < NS; n++) begin
      int lat;
      x = IW'(int'(800.0 * $sin(w * n)));
      model_step($itor(x));
      @(negedge clk) x_valid = 1;
      @(negedge clk) x_valid = 0;
      lat = 1;
      while (!y_valid && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 7) begin failures++; if (failures < 5) $display("FAIL latency %0d", lat); end
      if (n > NS / 2) begin
        real dev;
        if ($itor(y) > peak) peak = $itor(y);
        dev = $itor(y) - my[1];
        if (dev < 0) dev = -dev;
        if (dev > maxdev) maxdev = dev;
      end
      repeat (32 - lat - 1) @(negedge clk);
    end
  endtask

  initial begin
    real pk, dv, pref;
    for (int i = 0; i < 2; i++) begin my[i] = 0; ms[i] = 0; end
    #22 rst_n = 1;
    tone(1.0, pref, dv);
    $display("at f_c: peak %0.1f, max deviation from ideal model %0.2f", pref, dv);
    checks++;
    if (pref < 680 || pref > 920) begin failures++; $display("FAIL gain at f_c"); end
    checks++;
    if (dv > 2.0 + 0.01 * pref) begin failures++; $display("FAIL model mismatch at f_c"); end
    tone(1.4, pk, dv);
    $display("at 1.4 f_c: peak %0.1f, deviation %0.2f", pk, dv);
    checks++;
    if (pk > 0.05 * pref) begin failures++; $display("FAIL stop band 1.4 f_c"); end
    checks++;
    if (dv > 2.0 + 0.01 * pref) begin failures++; $display("FAIL model mismatch at 1.4 f_c"); end
    tone(0.6, pk, dv);
    $display("at 0.6 f_c: peak %0.1f", pk);
    checks++;
    if (pk > 0.05 * pref) begin failures++; $display("FAIL stop band 0.6 f_c"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
