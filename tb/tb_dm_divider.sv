// tb_dm_divider: checks the dual-modulus divider. After every rising edge
// of div_out the testbench applies a new random ratio n and modulus bit;
// these are taken at the next period start, so the period between the
// following two rising edges must be n + mod input cycles exactly. The
// high time must be ceil((n+mod)/2) cycles.
`timescale 1ns/1ps
module tb_dm_divider;
  localparam int NW = 8;
  logic clk_rf = 0, rst_n = 0, mod = 0, div_out;
  logic [NW-1:0] n = 8'd5;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, rise_cnt = 0, high_start = 0;
  int expq [$];

  dm_divider #(.NW(NW)) dut (.*);
  always #5 clk_rf = ~clk_rf;
  always @(posedge clk_rf) cyc++;

  initial begin
    #2000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge div_out) begin
    int p;
    if (expq.size() >= 2) begin
      p = expq.pop_front();
      checks++;
      if (cyc - last_rise != p) begin
        failures++;
        if (failures < 10) $display("FAIL period %0d expected %0d", cyc - last_rise, p);
      end
    end
    last_rise = cyc;
    rise_cnt++;
    #1;
    n   = NW'($urandom_range(40, 2));
    mod = $urandom_range(1, 0);
    expq.push_back(int'(n) + int'(mod));
  end

  always @(negedge div_out) begin
    int p;
    if (expq.size() >= 2) begin
      p = expq[0];
      checks++;
      if (cyc - last_rise != (p + 1) / 2) begin
        failures++;
        if (failures < 10) $display("FAIL high time %0d expected %0d", cyc - last_rise, (p + 1) / 2);
      end
    end
  end

  initial begin
    expq.push_back(5);
    #22 rst_n = 1;
    wait (rise_cnt == 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
