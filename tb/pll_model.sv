// pll_model: behavioural model (not synthesizable) of the analog core of
// a fractional-N PLL - reference, phase-frequency detector, loop filter and
// VCO - closed around the digital divider control. Instead of modelling
// phase detection it uses the locked-loop result: the VCO frequency
// follows f_ref times the division ratio n + mod, low-pass filtered by two
// cascaded first-order sections with corner BW_HZ (updated every reference
// clock), i.e. |G(f)| = 1/(1 + (f/BW_HZ)^2): unity in band and falling by
// 12 dB per octave outside, like a second-order loop.
// rf_clk is generated with real-valued half periods, so the frequency can
// move in steps far below the time unit of the caller.
`timescale 1ps/1fs
module pll_model #(
  parameter real F_REF = 26.0e6,
  parameter real BW_HZ = 100.0e3
) (
  input  logic       ref_clk,
  input  logic [7:0] n,
  input  logic       mod,
  input  real        init_ratio,
  output logic       rf_clk,
  output real        ratio
);
  localparam real PI = 3.14159265358979;
  real k, r1;
  realtime half_ps;

  initial begin
    k       = 1.0 - $exp(-2.0 * PI * BW_HZ / F_REF);
    rf_clk  = 1'b0;
    ratio   = init_ratio;
    r1      = init_ratio;
    half_ps = 1.0e12 / (2.0 * F_REF * ratio);
  end

  always @(posedge ref_clk) begin
    r1      = r1 + k * ($itor(n) + (mod ? 1.0 : 0.0) - r1);
    ratio   = ratio + k * (r1 - ratio);
    half_ps = 1.0e12 / (2.0 * F_REF * ratio);
  end

  always #(half_ps) rf_clk = ~rf_clk;
endmodule
