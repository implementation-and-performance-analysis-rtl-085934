// ddc_mixer: quadrature demodulator for one frequency assignment.
//
// Multiplies the real ADC sample x by the NCO outputs of this FA:
//   i = x * cos(wt),  q = x * (-sin(wt))
// which is x times exp(-j w t): the FA centred at w moves to 0 Hz, where the
// decimation filters that follow keep it and reject the image at 2w and the
// other FA. The ADC_W-bit sample times a Q1.15 NCO value is shifted right so
// that ADC full scale maps to OW-bit full scale, then rounded and saturated.
// Registered: one cycle of latency, one result per clock.
//
// The multipliers and the -sin branch follow the document's receiver block
// diagram; widths and scaling are this design's choice.
module ddc_mixer
  import dif_pkg::*;
#(
  parameter int XW = ADC_W,
  parameter int OW = BB_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [XW-1:0]    x_in,
  input  logic signed [AMP_W-1:0] cos_in,
  input  logic signed [AMP_W-1:0] sin_in,
  output logic signed [OW-1:0]    i_out,
  output logic signed [OW-1:0]    q_out
);
  localparam int PW = XW + AMP_W + 1;
  localparam int SH = COEF_FRAC - (OW - XW);
  logic signed [PW-1:0] pi_, pq_;

  always_comb begin
    pi_ = PW'(x_in * cos_in);
    pq_ = -PW'(x_in * sin_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= OW'(sat(round_shift(64'(pi_), SH), OW));
      q_out <= OW'(sat(round_shift(64'(pq_), SH), OW));
    end
  end
endmodule
