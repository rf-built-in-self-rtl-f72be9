// bist_top: digital part of a sigma-delta fractional-N transmitter PLL with
// a spectral built-in self test.
//
// Stimulus path: the two-tone LDI generator produces a single-bit stream of
// interleaved test tones; when te = 1 it replaces the TX-filter data as the
// modulation D(n), scaled to +/-mod_amp, which is added to the channel word
// N_I.FRAC. The first-order fractional accumulator turns the result into
// the integer ratio pll_n and the modulus bit pll_mod (d_q) of the PLL
// feedback divider, which divides rf_clk and sends pll_div_out to the
// (external, analog) phase-frequency detector. Within the loop bandwidth
// the RF frequency follows f_ref * (N + D(n)/2^WF).
//
// Analysis path: the sigma-delta frequency discriminator divides rf_clk by
// chan_int or chan_int+1 and samples the reference with the divided clock,
// giving a bit stream whose density is f_RF/f_ref - chan_int. It is
// resampled on the rising edge of clk (the discriminator's bit changes about
// half a reference period away from it) and analysed by the amplitude
// estimator, which reports the amplitude of the component selected by
// bp_kf every 8192 reference clocks.
//
// Clocks: clk is the reference f_ref (26 MHz in the reference design) and
// also the discriminator's sampled signal; rf_clk is the VCO output. The
// reference oscillator, PFD, loop filter, VCO and TX filter are outside this
// module. Block partitioning follows the document's transmitter drawing;
// clocking the fractional accumulator and the DSP from f_ref, and the
// resampling flop, are this design's choices.
module bist_top
  import bist_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rf_clk,
  input  logic                    te,
  input  logic signed [WF-1:0]    tx_data,
  input  logic [NI_W-1:0]         chan_int,
  input  logic [WF-1:0]           chan_frac,
  input  logic                    gen_load,
  input  tone_cfg_t               gen_cfg [GEN_L],
  input  logic [WF-1:0]           mod_amp,
  input  logic [KF_W-1:0]         bp_kf,
  input  logic [KBW_W-1:0]        bp_kbw,
  output logic                    pll_div_out,
  output logic                    pll_mod,
  output logic [NI_W-1:0]         pll_n,
  output logic                    demod,
  output logic [AMP_W-1:0]        amp,
  output logic                    amp_valid
);
  logic [13:0]               b_coef [GEN_L];
  logic signed [GEN_W-1:0]   xa0    [GEN_L];
  logic                      tone_bit;
  logic [NI_W+WF-1:0]        ratio_word;
  logic                      demod_rf;

  always_comb
    for (int i = 0; i < GEN_L; i++) begin
      b_coef[i] = gen_cfg[i].b;
      xa0[i]    = gen_cfg[i].xa0;
    end

  ldi_multitone_gen #(.W(GEN_W), .L(GEN_L)) u_gen (
    .clk(clk), .rst_n(rst_n), .load(gen_load), .b_coef(b_coef), .xa0(xa0),
    .xd(tone_bit), .tone(), .xa());

  mod_select #(.WF(WF), .NI_W(NI_W)) u_msel (
    .clk(clk), .rst_n(rst_n), .te(te), .tx_data(tx_data), .tone_bit(tone_bit),
    .mod_amp(mod_amp), .chan_int(chan_int), .chan_frac(chan_frac), .word(ratio_word));

  fracn_sdm #(.WF(WF), .NI_W(NI_W)) u_fsdm (
    .clk(clk), .rst_n(rst_n), .word(ratio_word), .n_int(pll_n), .dq(pll_mod));

  dm_divider #(.NW(NI_W)) u_pll_div (
    .clk_rf(rf_clk), .rst_n(rst_n), .n(pll_n), .mod(pll_mod), .div_out(pll_div_out));

  sdfd #(.NW(NI_W)) u_sdfd (
    .clk_rf(rf_clk), .ref_in(clk), .rst_n(rst_n), .n_int(chan_int),
    .demod(demod_rf), .div_out());

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) demod <= 1'b0;
    else        demod <= demod_rf;

  amp_estimator u_amp (
    .clk(clk), .rst_n(rst_n), .bit_in(demod), .kf(bp_kf), .kbw(bp_kbw),
    .amp(amp), .amp_valid(amp_valid));
endmodule
