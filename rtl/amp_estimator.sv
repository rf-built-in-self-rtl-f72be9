// amp_estimator: on-chip narrowband spectrum analysis of the demodulated
// sigma-delta bit stream. Chain: second-order CIC decimator (/32, to
// f_s/32 = 812.5 kHz at f_s = 26 MHz), programmable fourth-order LDI
// bandpass (centre about kf/512 * f_s/32 / (2 pi)), rectifier and CIC
// averager (/256). amp is the sum of 256 rectified bandpass samples, i.e.
// 256 * 2/pi times the peak amplitude of the selected tone in CIC output
// units (a full-scale +/-1 sine in the bit stream gives a CIC peak of
// 1024). One amp_valid pulse comes every 32*256 = 8192 clocks.
//
// The chain and both decimation factors follow the document; widths are
// this design's own.
module amp_estimator
  import bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_in,
  input  logic [KF_W-1:0]   kf,
  input  logic [KBW_W-1:0]  kbw,
  output logic [AMP_W-1:0]  amp,
  output logic              amp_valid
);
  logic signed [DEC_OW-1:0] dec_y;
  logic                     dec_v;
  logic signed [BP_OW-1:0]  bp_y;
  logic                     bp_v;
  logic        [BP_OW-1:0]  rect_y;
  logic                     rect_v;

  cic_dec #(.R(DEC_R), .OW(DEC_OW)) u_dec (
    .clk(clk), .rst_n(rst_n), .bit_in(bit_in), .y(dec_y), .y_valid(dec_v));

  ldi_bp4 #(.IW(DEC_OW), .OW(BP_OW), .KF_W(KF_W), .KBW_W(KBW_W)) u_bp (
    .clk(clk), .rst_n(rst_n), .x(dec_y), .x_valid(dec_v), .kf(kf), .kbw(kbw),
    .y(bp_y), .y_valid(bp_v));

  rectifier #(.W(BP_OW)) u_rect (
    .clk(clk), .rst_n(rst_n), .x(bp_y), .x_valid(bp_v), .y(rect_y), .y_valid(rect_v));

  cic_avg #(.W(BP_OW), .R(AVG_R)) u_avg (
    .clk(clk), .rst_n(rst_n), .x(rect_y), .x_valid(rect_v), .y(amp), .y_valid(amp_valid));
endmodule
