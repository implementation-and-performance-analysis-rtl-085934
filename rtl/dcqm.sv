// dcqm: digital complex quadrature modulator for one frequency assignment.
//
// Moves one FA's baseband pair (I, Q) up to the NCO frequency by a complex
// multiplication with exp(j w t):
//   s_i = I cos(wt) - Q sin(wt)
//   s_q = I sin(wt) + Q cos(wt)
// which is the per-FA term of the transmitter's I and Q DAC signals. Because
// both the I and the Q product are formed, the image at -w cancels.
// cos/sin are Q1.15 from an NCO; each result is rounded, shifted back by 15
// and saturated to DW bits, and registered: one cycle of latency, one result
// per clock.
//
// The equations and signs follow the document's transmitter description and
// block diagram; the fixed-point scaling is this design's choice.
module dcqm
  import dif_pkg::*;
#(
  parameter int DW = BB_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DW-1:0]    i_in,
  input  logic signed [DW-1:0]    q_in,
  input  logic signed [AMP_W-1:0] cos_in,
  input  logic signed [AMP_W-1:0] sin_in,
  output logic signed [DW-1:0]    s_i,
  output logic signed [DW-1:0]    s_q
);
  localparam int PW = DW + AMP_W + 1;
  logic signed [PW-1:0] mi, mq;

  always_comb begin
    mi = PW'(i_in * cos_in) - PW'(q_in * sin_in);
    mq = PW'(i_in * sin_in) + PW'(q_in * cos_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_i <= '0;
      s_q <= '0;
    end else begin
      s_i <= DW'(sat(round_shift(64'(mi), COEF_FRAC), DW));
      s_q <= DW'(sat(round_shift(64'(mq), COEF_FRAC), DW));
    end
  end
endmodule
