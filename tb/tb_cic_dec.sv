// tb_cic_dec: checks the dump-and-reset CIC decimator against a textbook
// second-order CIC (two integrators, decimation by R, two combs) computed
// in unbounded integers, on a random bit stream and on an all-ones run.
// Every output must match exactly, and outputs must come every R clocks.
`timescale 1ns/1ps
module tb_cic_dec;
  localparam int R = 32, OW = 12;
  logic clk = 0, rst_n = 0, bit_in = 0, y_valid;
  logic signed [OW-1:0] y;
  int checks = 0, failures = 0;
  longint i1 = 0, i2 = 0, c1p = 0, c2p = 0;
  longint expq [$];
  int nin = 0, last_v = -1, cyc = 0;

  cic_dec #(.R(R), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10.0 * R * 500);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, fed with the same bits
  always @(posedge clk) if (rst_n) begin
    longint c1;
    cyc++;
    i1 += bit_in ? 1 : -1;
    i2 += i1;
    nin++;
    if (nin % R == 0) begin
      c1 = i2 - c1p; c1p = i2;
      expq.push_back(c1 - c2p); c2p = c1;
    end
    if (y_valid) begin
      checks++;
      if (expq.size() == 0 || longint'(y) != expq[0]) begin
        failures++;
        if (failures < 10) $display("FAIL y %0d expected %0d", y, expq.size() ? expq[0] : 0);
      end
      if (expq.size()) void'(expq.pop_front());
      if (last_v >= 0) begin
        checks++;
        if (cyc - last_v != R) begin failures++; $display("FAIL output spacing %0d", cyc - last_v); end
      end
      last_v = cyc;
    end
  end

  initial begin
    #22 rst_n = 1;
    for (int n = 0; n < R * 200; n++) begin
      @(negedge clk);
      bit_in = (n > R * 150 && n < R * 160) ? 1'b1 : ((n > R * 170) ? 1'b0 : 1'($urandom));
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
