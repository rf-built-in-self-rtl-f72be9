// ldi_multitone_gen: L-tone digital sine generator built from lossless
// discrete integrators (LDI), time-multiplexed over one set of hardware.
//
// Each tone is a resonator of two accumulators. Accumulator B collects
// -b * xd, where xd = +/-1 is the sigma-delta coded value of accumulator A,
// so the multiplier by b reduces to selecting +b or -b. Accumulator A
// collects a * x_b with a = 2^-ALPHA, a fixed arithmetic shift. The tone
// frequency is omega = arccos(1 - ab/2) * f_s/L (about sqrt(ab) f_s/L) and
// its amplitude is the initial value x_a(0), with x_b(0) = 0, so frequency
// and amplitude are set independently.
//
// Time multiplexing: every state element is an L-deep register chain, so a
// different tone is processed in each clock (tone index "tone", which for
// L = 2 toggles at f_s/2) and each tone runs at f_s/L. The b value is
// picked by {tone, xd}: for L = 2, 00 -> +b1, 01 -> -b1, 10 -> +b2,
// 11 -> -b2, where xd = 1 stands for +1. The sigma-delta modulator
// (sdm2_tdm) is shared the same way.
//
// Own choice, deliberately differing from a literal reading of the
// two-accumulator drawing: the shift path into accumulator A takes the
// freshly updated x_b (the output of B's adder) rather than the registered
// one. The sigma-delta modulator delays its input by one sample, and with
// that delay the drawn connection becomes a forward-Euler resonator whose
// amplitude grows by a factor sqrt(1+ab) per sample; taking the updated
// x_b restores the lossless integrator pair (determinant 1) that the
// frequency formula above assumes.
//
// Number formats (own choices): x_a is W bits signed with full scale
// FS = 2^(W-1); x_b has WB bits with 2 fraction bits below the x_a LSB;
// b = b_coef / 2^(W+1). With W = 15 and ALPHA = 5 a b_coef of 110..16383
// covers 15..183 kHz at f_s = 26 MHz, L = 2.
//
// Interface: load (one clock) writes x_a(0) of every tone, clears x_b and
// the modulator and restarts the tone index at 0. Every clock after that
// xd is the stream bit of tone "tone" and xa is that tone's new x_a.
//
// Amplitude stability: the resonator is undamped and accumulator B also
// integrates the modulator's quantization noise, so the amplitude
// diffuses, much faster for high tones (noise shaping rises as f^4). A
// 120 kHz tone at 0.37 FS holds for about 10 ms, then grows until the
// modulator overloads (near 30 ms). Reload before each measurement. There
// is deliberately no amplitude control: the structure follows the
// two-tone oscillator as described, which has none.
module ldi_multitone_gen
#(
  parameter int W     = 15,
  parameter int L     = 2,
  parameter int ALPHA = 5,
  parameter int BC_W  = 14,
  parameter int WB    = 19
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [BC_W-1:0]         b_coef [L],
  input  logic signed [W-1:0]     xa0    [L],
  output logic                    xd,
  output logic [$clog2(L)-1:0]    tone,
  output logic signed [W-1:0]     xa
);
  localparam int FB = 2;        // fraction bits of x_b below the x_a LSB
  localparam int TW = $clog2(L);

  logic signed [W-1:0]  a_q [L];
  logic signed [WB-1:0] b_q [L];
  logic [TW-1:0]        tone_q;
  logic signed [WB-1:0] bsel, b_d;
  logic signed [W-1:0]  a_d;
  logic                 sdm_bit;

  // Tone whose state sits at the end of the chains in this clock.
  assign tone = tone_q;
  assign xd   = sdm_bit;
  assign xa   = a_d;

  always_comb begin
    // b multiplexer: sign chosen by the modulator bit (minus for +1).
    bsel = sdm_bit ? -$signed(WB'({1'b0, b_coef[tone_q]}))
                   :  $signed(WB'({1'b0, b_coef[tone_q]}));
    b_d  = b_q[L-1] + bsel;                                // accumulator B
    a_d  = a_q[L-1] + W'(b_d >>> (ALPHA + FB));            // accumulator A
  end

  sdm2_tdm #(.W(W), .L(L)) u_sdm (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (load),
    .x     (a_d),
    .xd    (sdm_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tone_q <= '0;
      for (int i = 0; i < L; i++) begin
        a_q[i] <= '0;
        b_q[i] <= '0;
      end
    end else if (load) begin
      tone_q <= '0;
      // chain position L-1-j holds tone j when tone_q = 0
      for (int j = 0; j < L; j++) begin
        a_q[L-1-j] <= xa0[j];
        b_q[L-1-j] <= '0;
      end
    end else begin
      tone_q <= (tone_q == TW'(L-1)) ? '0 : tone_q + 1'b1;
      a_q[0] <= a_d;
      b_q[0] <= b_d;
      for (int i = 1; i < L; i++) begin
        a_q[i] <= a_q[i-1];
        b_q[i] <= b_q[i-1];
      end
    end
  end
endmodule
