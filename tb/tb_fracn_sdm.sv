// tb_fracn_sdm: checks the first-order fractional accumulator. For random
// fractional words F, the number of modulus bits after M clocks from reset
// must be exactly floor(M*F/2^WF), so the average division ratio is
// N_I + F/2^WF; n_int must follow the integer part with one clock latency.
`timescale 1ns/1ps
module tb_fracn_sdm;
  localparam int WF = 22, NI_W = 8;
  logic clk = 0, rst_n = 0;
  logic [NI_W+WF-1:0] word = '0;
  logic [NI_W-1:0] n_int;
  logic dq;
  int checks = 0, failures = 0;

  fracn_sdm #(.WF(WF), .NI_W(NI_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      longint f, ones;
      logic [NI_W-1:0] ni;
      f  = (t == 0) ? (longint'(1) << (WF - 1)) : longint'($urandom_range((1 << WF) - 1, 1));
      ni = NI_W'($urandom_range(250, 2));
      rst_n = 0;
      word  = {ni, WF'(f)};
      #12 rst_n = 1;
      ones = 0;
      for (int m = 1; m <= 5000; m++) begin
        @(posedge clk); #1;
        ones += dq;
        if (m % 1000 == 0) begin
          checks++;
          if (ones != (longint'(m) * f) >> WF) begin
            failures++;
            $display("FAIL F=%0d after %0d clocks: %0d ones, expected %0d", f, m, ones, (longint'(m) * f) >> WF);
          end
        end
      end
      checks++;
      if (n_int != ni) begin failures++; $display("FAIL n_int %0d expected %0d", n_int, ni); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
