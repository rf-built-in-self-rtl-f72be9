// cic_avg: averaging CIC decimator. It sums R valid input samples and
// outputs the sum (the average times R) once per R samples, then restarts:
// a first-order CIC whose single comb is replaced by dump-and-reset. The
// decimation factor 256 is the document's; the document does not give
// the order of this averager, so the simplest (first order) is used.
// y_valid pulses one clock after the R-th valid input.
module cic_avg #(
  parameter int W = 14,
  parameter int R = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [W-1:0]                x,
  input  logic                        x_valid,
  output logic [W+$clog2(R)-1:0]      y,
  output logic                        y_valid
);
  localparam int AW = W + $clog2(R);
  localparam int CW = $clog2(R);
  logic [AW-1:0] acc;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      cnt     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (x_valid) begin
        if (cnt == CW'(R-1)) begin
          y       <= acc + AW'(x);
          y_valid <= 1'b1;
          acc     <= '0;
          cnt     <= '0;
        end else begin
          acc <= acc + AW'(x);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
