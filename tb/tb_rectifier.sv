// tb_rectifier: random signed samples with random valid; the output one
// clock later must be |x| (the most negative value saturating to the
// largest positive one) and y_valid must follow x_valid.
`timescale 1ns/1ps
module tb_rectifier;
  localparam int W = 14;
  logic clk = 0, rst_n = 0, x_valid = 0, y_valid;
  logic signed [W-1:0] x = '0;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  rectifier #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    #22 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x = (i == 5) ? {1'b1, {(W-1){1'b0}}} : W'($urandom);
      x_valid = 1'b1;
      e = (int'(x) < 0) ? -int'(x) : int'(x);
      if (e > (1 << (W - 1)) - 1) e = (1 << (W - 1)) - 1;
      @(negedge clk);
      x_valid = 1'b0;
      checks++;
      if (!y_valid || int'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x %0d y %0d expected %0d", x, y, e);
      end
      @(negedge clk);
      checks++;
      if (y_valid) begin failures++; $display("FAIL valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
