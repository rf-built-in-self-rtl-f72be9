// tb_cic_avg: random unsigned samples arriving with random gaps; each
// output must be the exact sum of the last R valid samples and one output
// must come per R valid samples.
`timescale 1ns/1ps
module tb_cic_avg;
  localparam int W = 14, R = 256;
  logic clk = 0, rst_n = 0, x_valid = 0, y_valid;
  logic [W-1:0] x = '0;
  logic [W+7:0] y;
  int checks = 0, failures = 0;
  longint sum = 0, expq [$];
  int nv = 0, nout = 0;

  cic_avg #(.W(W), .R(R)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #(10.0 * R * 10 * 4);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && y_valid) begin
    checks++; nout++;
    if (expq.size() == 0 || longint'(y) != expq[0]) begin
      failures++;
      if (failures < 10) $display("FAIL y %0d expected %0d", y, expq.size() ? expq[0] : -1);
    end
    if (expq.size()) void'(expq.pop_front());
  end

  initial begin
    #22 rst_n = 1;
    for (int i = 0; i < R * 8; i++) begin
      @(negedge clk);
      x = W'($urandom);
      x_valid = 1'b1;
      sum += longint'(x);
      nv++;
      if (nv % R == 0) begin expq.push_back(sum); sum = 0; end
      @(negedge clk);
      x_valid = 1'b0;
      repeat ($urandom_range(3, 0)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (nout != 8) begin failures++; $display("FAIL %0d outputs, expected 8", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
