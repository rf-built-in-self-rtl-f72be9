// sdm2_tdm: second-order single-bit sigma-delta modulator shared by L
// time-interleaved channels (the "SDM attenuator" of the multitone
// generator).
//
// Structure (follows the document's figure): a delay-free integrator
// (s1 = s1' + x - fb) followed by a delayed integrator (s2 = s2' + s1 - fb)
// whose output drives a sign quantizer. The quantizer output is fed back as
// +/-FS, FS = 2^(W-1), to both integrator inputs. Each integrator holds its
// state in an L-deep register chain instead of a single register, so a new
// channel is served every clock and channel k sees its own state again L
// clocks later; with L = 2 this costs one register per channel per chain.
// Per channel the signal transfer is one sample of delay and the noise is
// shaped by (1 - z^-1)^2.
//
// Interface: x is sampled every clock; xd (1 = +1, 0 = -1) is the bit of
// the channel whose sample is presented in the same clock, computed from
// that channel's state, i.e. from its earlier inputs. clr clears all state
// synchronously. Integrator width W+GUARD is this design's own choice.
module sdm2_tdm #(
  parameter int W     = 15,
  parameter int L     = 2,
  parameter int GUARD = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic signed [W-1:0] x,
  output logic                xd
);
  localparam int SW = W + GUARD;
  localparam logic signed [SW-1:0] FS = SW'(1) <<< (W-1);

  logic signed [SW-1:0] s1_q [L];
  logic signed [SW-1:0] s2_q [L];
  logic signed [SW-1:0] fb, s1_d, s2_d;

  always_comb begin
    xd   = ~s2_q[L-1][SW-1];               // sign quantizer: s2 >= 0 -> +1
    fb   = xd ? FS : -FS;
    s1_d = s1_q[L-1] + SW'(x) - fb;        // delay-free integrator
    s2_d = s2_q[L-1] + s1_d - fb;          // delayed integrator input
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) begin
        s1_q[i] <= '0;
        s2_q[i] <= '0;
      end
    end else if (clr) begin
      for (int i = 0; i < L; i++) begin
        s1_q[i] <= '0;
        s2_q[i] <= '0;
      end
    end else begin
      s1_q[0] <= s1_d;
      s2_q[0] <= s2_d;
      for (int i = 1; i < L; i++) begin
        s1_q[i] <= s1_q[i-1];
        s2_q[i] <= s2_q[i-1];
      end
    end
  end
endmodule
