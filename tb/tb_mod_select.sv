// tb_mod_select: checks the test-enable multiplexer and channel-word adder
// against an independent model on random vectors: te = 0 adds the signed
// TX data to N_I.FRAC, te = 1 adds +mod_amp for a 1 bit and -mod_amp for a
// 0 bit. The result must appear one clock after the inputs.
`timescale 1ns/1ps
module tb_mod_select;
  localparam int WF = 22, NI_W = 8;
  logic clk = 0, rst_n = 0, te = 0, tone_bit = 0;
  logic signed [WF-1:0] tx_data = '0;
  logic [WF-1:0] mod_amp = '0, chan_frac = '0;
  logic [NI_W-1:0] chan_int = '0;
  logic [NI_W+WF-1:0] word;
  int checks = 0, failures = 0;

  mod_select #(.WF(WF), .NI_W(NI_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      te        = $urandom_range(1, 0);
      tone_bit  = $urandom_range(1, 0);
      tx_data   = WF'($urandom);
      mod_amp   = WF'($urandom) >> 1;
      chan_int  = NI_W'($urandom_range(200, 20));
      chan_frac = WF'($urandom);
      expv = (longint'(chan_int) << WF) + longint'(chan_frac);
      if (te) expv += tone_bit ? longint'(mod_amp) : -longint'(mod_amp);
      else    expv += longint'(tx_data);
      expv &= (64'd1 << (NI_W + WF)) - 1;
      @(negedge clk);
      checks++;
      if (longint'(word) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: word %h expected %h", i, word, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
