// fir_decim: 129-tap raised-cosine decimation FIR, rate / M.
//
// The receive side uses the same raised-cosine design as the transmit side
// for the same profile (taps summing to M in Q1.15; the output is shifted
// right by 15 + log2(M) so the DC gain is one). Input samples enter a
// TAPS-long delay line on every `in_valid`; on every M-th of them the full
// convolution sum_k h[k] x[n-k] is evaluated in one cycle and the result is
// registered, so out_valid pulses once per M inputs, one cycle after the
// input that completed the block. Results are rounded and saturated to DW
// bits. M must be a power of two (the document's rates are 2, 4, 8, 16).
//
// From the document: filter type, tap count, coefficient width and rates.
// Own choices: direct form with all products in one cycle, the output phase
// (the first output follows the M-th input after reset) and the scaling.
module fir_decim
  import dif_pkg::*;
#(
  parameter int M        = 2,
  parameter int TAPS     = NTAPS,
  parameter int FS_KHZ   = 61440,
  parameter int FC_KHZ   = 2800,
  parameter int BETA_PPM = 220000,
  parameter int DW       = BB_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);
  localparam int CW  = (M > 1) ? $clog2(M) : 1;
  localparam int SH  = COEF_FRAC + $clog2(M);
  localparam int AW  = DW + COEF_W + $clog2(TAPS) + 1;

  typedef logic signed [COEF_W-1:0] coef_t [TAPS];

  function automatic coef_t make_coefs();
    coef_t c;
    for (int k = 0; k < TAPS; k++)
      c[k] = COEF_W'(rc_coef(k, TAPS, FS_KHZ, FC_KHZ, BETA_PPM, M));
    return c;
  endfunction

  localparam coef_t COEF = make_coefs();

  logic signed [DW-1:0] dl   [TAPS];   // dl[0] is the newest sample
  logic signed [DW-1:0] dl_n [TAPS];
  logic [CW-1:0]        cnt;
  logic                 fire;
  logic signed [AW-1:0] acc;

  assign fire = in_valid && (cnt == CW'(M - 1));

  always_comb begin
    dl_n = dl;
    if (in_valid) begin
      for (int k = TAPS - 1; k > 0; k--) dl_n[k] = dl[k-1];
      dl_n[0] = in_data;
    end
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc += AW'(COEF[k] * dl_n[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
    end else begin
      out_valid <= fire;
      if (in_valid) begin
        dl  <= dl_n;
        cnt <= (cnt == CW'(M - 1)) ? '0 : cnt + 1'b1;
      end
      if (fire) out_data <= DW'(sat(round_shift(64'(acc), SH), DW));
    end
  end
endmodule
