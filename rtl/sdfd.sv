// sdfd: first-order sigma-delta frequency discriminator. A dual-modulus
// divider runs directly on the RF signal and a D flip-flop, clocked by the
// divider output f_div, samples the reference clock f_ref. The flop output
// is the demodulated bit and also selects the modulus: 1 -> /(N+1),
// 0 -> /N. With N f_ref < f_RF < (N+1) f_ref the loop keeps the divider
// edges close to the falling edge of f_ref, and the density of ones in the
// bit stream equals f_RF/f_ref - N: a first-order sigma-delta coding of the
// instantaneous RF frequency. N is the integer part of the channel word.
//
// Structure (divider + flip-flop + feedback) follows the document. The
// polarity of the modulus control is this design's choice, made so that
// the loop is stable with a reference that is high in the first half of
// its period. demod changes on rising edges of div_out, i.e. about half a
// reference period away from the rising edge of f_ref, where the
// downstream logic resamples it.
module sdfd #(
  parameter int NW = 8
) (
  input  logic          clk_rf,
  input  logic          ref_in,
  input  logic          rst_n,
  input  logic [NW-1:0] n_int,
  output logic          demod,
  output logic          div_out
);
  dm_divider #(.NW(NW)) u_div (
    .clk_rf  (clk_rf),
    .rst_n   (rst_n),
    .n       (n_int),
    .mod     (demod),
    .div_out (div_out)
  );

  always_ff @(posedge div_out or negedge rst_n) begin
    if (!rst_n) demod <= 1'b0;
    else        demod <= ref_in;
  end
endmodule
