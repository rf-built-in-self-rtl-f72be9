// rectifier: absolute value of a signed sample stream, registered. The
// most negative input maps to the largest positive value. Function from
// the document's amplitude-estimator chain; the register and valid
// handshake are this design's choices (one clock latency).
module rectifier #(
  parameter int W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  input  logic                x_valid,
  output logic        [W-1:0] y,
  output logic                y_valid
);
  localparam logic [W-1:0] MAXP = {1'b0, {(W-1){1'b1}}};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        if (x == {1'b1, {(W-1){1'b0}}}) y <= MAXP;
        else if (x[W-1])                y <= W'(-x);
        else                            y <= W'(x);
      end
    end
  end
endmodule
