// mod_select: front end of the fractional-N modulator. A test-enable
// multiplexer chooses the modulation data D(n): the TX filter output in
// normal operation (te = 0) or the test-tone bit stream of the multitone
// generator (te = 1). The single-bit tone stream is turned into a word by
// selecting +mod_amp or -mod_amp, so mod_amp plays the role of the peak
// modulation value m-hat (peak deviation m-hat/2^WF * f_ref). D(n) is then
// added to the channel word N_I.FRAC, giving the instantaneous division
// ratio in WF-bit fixed point.
//
// The multiplexer, the adder and their position follow the document's
// transmitter drawing; the +/-mod_amp mapping of the tone bit and the
// output register (one clock of latency) are this design's own choices.
module mod_select #(
  parameter int WF   = 22,
  parameter int NI_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     te,
  input  logic signed [WF-1:0]     tx_data,
  input  logic                     tone_bit,
  input  logic [WF-1:0]            mod_amp,
  input  logic [NI_W-1:0]          chan_int,
  input  logic [WF-1:0]            chan_frac,
  output logic [NI_W+WF-1:0]       word
);
  localparam int OW = NI_W + WF;
  logic signed [WF:0] d;          // one extra bit so that -mod_amp fits

  always_comb begin
    if (te) d = tone_bit ? $signed({1'b0, mod_amp}) : -$signed({1'b0, mod_amp});
    else    d = {tx_data[WF-1], tx_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word <= '0;
    else        word <= {chan_int, chan_frac} + OW'(d);
  end
endmodule
