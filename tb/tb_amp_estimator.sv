// tb_amp_estimator: end-to-end test of the narrowband analyser. A
// first-order sigma-delta model in the testbench codes two tones, 0.4 of
// full scale each, at 50 kHz and 100 kHz (f_s = 26 MHz) into a bit stream.
// With the bandpass tuned to one tone (k_f = round(1024 sin(pi f/f_sR)))
// the amplitude output must be 256 * 2/pi * 1024 * 0.4 * |H_CIC(f)|
// within 10 %; tuned to 75 kHz, between the tones, it must be far lower.
// Outputs must come every 8192 clocks.
`timescale 1ns/1ps
module tb_amp_estimator;
  import bist_pkg::*;
  localparam real FS = 26.0e6, FSR = FS / 32.0, PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, bit_in = 0, amp_valid;
  logic [KF_W-1:0] kf;
  logic [KBW_W-1:0] kbw = 9'd96;
  logic [AMP_W-1:0] amp;
  int checks = 0, failures = 0;
  real acc = 0, tsec = 0;
  longint cyc = 0, lastv = -1;

  amp_estimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10.0 * 8192 * 20);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first-order sigma-delta source
  always @(negedge clk) begin
    real v;
    v = 0.4 * $sin(2 * PI * 50.0e3 * tsec) + 0.4 * $sin(2 * PI * 100.0e3 * tsec);
    acc += v - (bit_in ? 1.0 : -1.0);
    bit_in <= (acc >= 0);
    tsec += 1.0 / FS;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && amp_valid) begin
      if (lastv >= 0) begin
        checks++;
        if (cyc - lastv != 8192) begin failures++; $display("FAIL output spacing %0d", cyc - lastv); end
      end
      lastv = cyc;
    end
  end

  function automatic real cic_gain(real f);
    real fr;
    fr = f / FS;
    return ($sin(PI * fr * 32) / (32.0 * $sin(PI * fr))) ** 2;
  endfunction

  task automatic measure(real f, output real a);
    kf = KF_W'(int'(1024.0 * $sin(PI * f / FSR)));
    repeat (3) @(posedge clk iff amp_valid);   // settle
    @(posedge clk iff amp_valid);
    a = $itor(amp);
  endtask

  initial begin
    real a1, a2, a3, e1, e2;
    kf = 9'd100;
    #22 rst_n = 1;
    measure(50.0e3, a1);
    measure(100.0e3, a2);
    measure(75.0e3, a3);
    e1 = 256.0 * 2.0 / PI * 1024.0 * 0.4 * cic_gain(50.0e3);
    e2 = 256.0 * 2.0 / PI * 1024.0 * 0.4 * cic_gain(100.0e3);
    $display("50 kHz: %0.0f expected %0.0f; 100 kHz: %0.0f expected %0.0f; 75 kHz: %0.0f",
             a1, e1, a2, e2, a3);
    checks++; if (a1 < 0.9 * e1 || a1 > 1.1 * e1) begin failures++; $display("FAIL 50 kHz"); end
    checks++; if (a2 < 0.9 * e2 || a2 > 1.1 * e2) begin failures++; $display("FAIL 100 kHz"); end
    checks++; if (a3 > 0.1 * e1) begin failures++; $display("FAIL 75 kHz rejection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
