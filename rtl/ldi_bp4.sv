// ldi_bp4: fourth-order programmable bandpass made of two cascaded
// second-order LDI resonators that share a single multiplier.
//
// One resonator (per input sample n):
//   s2(n)   = s2(n-1) + kf * y(n)                       delay-free integrator
//   y(n+1)  = y(n) + kbw * (x(n) - y(n)) - kf * s2(n)   delayed integrator
// k_f alone sets the centre frequency, f_c = f_s/pi * asin(k_f/2), about
// k_f f_s / (2 pi); k_bw sets the damping and so the bandwidth. The input
// enters through the same k_bw factor, which makes the gain at f_c close
// to 1. As in the LDI oscillator, truncating k_f only moves f_c.
//
// Resource sharing: the filter runs at the decimated rate (f_s/32), so one
// multiplier is time-shared. After each x_valid a six-step sequence runs:
// section 2 first, using section 1's output from before this update, then
// section 1; each section needs kf*y, kf*s2 and kbw*(x-y). y_valid pulses
// when the sequence ends; y is section 2's output. x_valid must be at
// least 7 clocks apart.
//
// Topology, the 9-bit k_f and the single shared multiplier follow the
// document. Own choices: k_f = kf/2^9 (unsigned), k_bw = kbw/2^12, FB
// fraction bits in the state registers, truncating products, and
// saturation of the output to OW bits.
module ldi_bp4 #(
  parameter int IW    = 12,
  parameter int OW    = 14,
  parameter int FB    = 14,
  parameter int KF_W  = 9,
  parameter int KBW_W = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [IW-1:0]  x,
  input  logic                  x_valid,
  input  logic [KF_W-1:0]       kf,
  input  logic [KBW_W-1:0]      kbw,
  output logic signed [OW-1:0]  y,
  output logic                  y_valid
);
  localparam int DW = IW + 4 + FB;   // state width
  localparam int CS = 12;            // coefficient fraction bits after alignment
  localparam int CW = CS + 1;        // coefficient operand width, unsigned

  typedef enum logic [2:0] {IDLE, S1A, S1B, S1C, S0A, S0B, S0C} step_t;
  step_t step;

  logic signed [DW-1:0] y_q [2];
  logic signed [DW-1:0] s_q [2];
  logic signed [DW-1:0] x_q, kfs2_q;
  logic signed [DW-1:0] opnd, u;
  logic        [CW-1:0] coef;
  logic signed [DW+CW:0] prod;
  logic signed [DW-1:0] pscaled;
  logic                 sec;

  // operands of the shared multiplier
  always_comb begin
    sec  = (step == S0A || step == S0B || step == S0C) ? 1'b0 : 1'b1;
    u    = sec ? y_q[0] : x_q;          // section input
    coef = CW'(kf) << (CS - KF_W);      // kf/2^9 == (kf << 3)/2^12
    unique case (step)
      S1A, S0A: opnd = y_q[sec];
      S1B, S0B: opnd = s_q[sec];
      S1C, S0C: begin opnd = u - y_q[sec]; coef = CW'(kbw); end
      default:  opnd = '0;
    endcase
    prod    = opnd * $signed({1'b0, coef});
    pscaled = DW'(prod >>> CS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step    <= IDLE;
      y_valid <= 1'b0;
      x_q     <= '0;
      kfs2_q  <= '0;
      for (int i = 0; i < 2; i++) begin
        y_q[i] <= '0;
        s_q[i] <= '0;
      end
    end else begin
      y_valid <= 1'b0;
      unique case (step)
        IDLE: if (x_valid) begin
          x_q  <= DW'(x) <<< FB;
          step <= S1A;
        end
        S1A, S0A: begin
          s_q[sec] <= s_q[sec] + pscaled;
          step <= (step == S1A) ? S1B : S0B;
        end
        S1B, S0B: begin
          kfs2_q <= pscaled;
          step <= (step == S1B) ? S1C : S0C;
        end
        S1C: begin
          y_q[1] <= y_q[1] + pscaled - kfs2_q;
          step   <= S0A;
        end
        S0C: begin
          y_q[0]  <= y_q[0] + pscaled - kfs2_q;
          step    <= IDLE;
          y_valid <= 1'b1;
        end
        default: step <= IDLE;
      endcase
    end
  end

  // output: section-2 state, saturated to OW bits
  localparam logic signed [DW-FB-1:0] OMAX = (DW-FB)'((1 <<< (OW-1)) - 1);
  logic signed [DW-FB-1:0] yint;
  always_comb begin
    yint = y_q[1][DW-1:FB];
    if (yint > OMAX)       y = OW'(OMAX);
    else if (yint < -OMAX) y = OW'(-OMAX);
    else                   y = OW'(yint);
  end

  // a new sample may only arrive when the sequence has finished
  a_not_busy: assert property (@(posedge clk) disable iff (!rst_n)
                               x_valid |-> (step == IDLE));
endmodule
