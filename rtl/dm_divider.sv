// dm_divider: dual-modulus (/N, /N+1) counter divider clocked by the RF
// signal. At the start of each output period it samples n and mod and
// counts P = n + mod input cycles; div_out is high for the first ceil(P/2)
// of them, so each rising edge of div_out marks the start of a period.
// Changes of n or mod take effect at the next period start.
//
// The document only names the divider and its two moduli; this counter
// implementation, the duty cycle and the registered output are this
// design's choices. A ratio below 2 (for instance the zero ratio that
// reaches it while the modulator comes out of reset) is treated as 2.
module dm_divider #(
  parameter int NW = 8
) (
  input  logic          clk_rf,
  input  logic          rst_n,
  input  logic [NW-1:0] n,
  input  logic          mod,
  output logic          div_out
);
  logic [NW:0] cnt, cnt_d, half_q, half_d, p;

  always_comb begin
    p = {1'b0, n} + (NW+1)'(mod);
    if (p < (NW+1)'(2)) p = (NW+1)'(2);
    if (cnt == '0) begin
      cnt_d  = p - 1'b1;
      half_d = p >> 1;
    end else begin
      cnt_d  = cnt - 1'b1;
      half_d = half_q;
    end
  end

  always_ff @(posedge clk_rf or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      half_q  <= '0;
      div_out <= 1'b0;
    end else begin
      cnt     <= cnt_d;
      half_q  <= half_d;
      div_out <= (cnt_d >= half_d);
    end
  end

endmodule
