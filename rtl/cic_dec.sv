// cic_dec: second-order CIC decimator for a single-bit sigma-delta stream,
// with one comb replaced by dump-and-reset.
//
// Input bit 1 counts as +1 and 0 as -1. A delay-free integrator runs
// freely; a second integrator accumulates its output and is cleared every
// R input samples, right after its value is dumped; a single comb at the
// low rate subtracts the previous dump. The result equals a standard
// two-integrator, two-comb CIC (a triangular window of 2R-1 taps, response
// (sin(pi F)/sin(pi F/R))^2), with DC gain R^2. All arithmetic wraps
// modulo 2^OW, which is exact because |y| <= R^2 < 2^(OW-1).
//
// Structure and R = 32 follow the document; the output width and the
// one-clock valid strobe y_valid (every R clocks) are own choices.
module cic_dec #(
  parameter int R  = 32,
  parameter int OW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_in,
  output logic signed [OW-1:0] y,
  output logic                 y_valid
);
  localparam int CW = $clog2(R);
  logic signed [OW-1:0] i1_q, i2_q, dump_q, v1, v2;
  logic [CW-1:0]        cnt;

  always_comb begin
    v1 = i1_q + (bit_in ? OW'(1) : -OW'(1));
    v2 = i2_q + v1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1_q    <= '0;
      i2_q    <= '0;
      dump_q  <= '0;
      cnt     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      i1_q    <= v1;
      y_valid <= 1'b0;
      if (cnt == CW'(R-1)) begin
        cnt     <= '0;
        i2_q    <= '0;            // reset after dump
        y       <= v2 - dump_q;   // comb
        dump_q  <= v2;
        y_valid <= 1'b1;
      end else begin
        cnt  <= cnt + 1'b1;
        i2_q <= v2;
      end
    end
  end
endmodule
