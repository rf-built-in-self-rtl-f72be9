// fracn_sdm: digital sigma-delta modulator of the fractional-N PLL. It
// splits the division ratio word N_I.F (WF fraction bits) into the integer
// ratio n_int and a single-bit modulus control dq: a WF-bit accumulator adds
// F every clock and its carry is dq, so the divider divides by N_I + 1 in a
// fraction F/2^WF of the reference periods and the average ratio is
// N_I + F/2^WF.
//
// The document shows a single-bit "digital SDM" driving a /N/N+1 divider
// and names wf as the accumulator length; it does not give the order. A
// first-order accumulator is the simplest modulator with a single-bit
// output and is used here. Outputs are registered (one clock latency); the
// design clocks it with the reference clock.
module fracn_sdm #(
  parameter int WF   = 22,
  parameter int NI_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NI_W+WF-1:0]   word,
  output logic [NI_W-1:0]      n_int,
  output logic                 dq
);
  logic [WF-1:0] acc;
  logic [WF:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, word[WF-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      dq    <= 1'b0;
      n_int <= '0;
    end else begin
      acc   <= sum[WF-1:0];
      dq    <= sum[WF];
      n_int <= word[NI_W+WF-1:WF];
    end
  end
endmodule
