// fir_interp: 129-tap raised-cosine interpolation FIR, rate x L, polyphase.
//
// The filter is a symmetric raised-cosine low-pass designed at elaboration
// time from its sample rate FS_KHZ (the output, high-rate side), cutoff
// FC_KHZ and roll-off BETA_PPM, quantised to 16-bit Q1.15 taps whose sum is
// L, so that every polyphase branch has a DC gain of about one. It is
// computed in polyphase form: output y[nL+p] = sum_k h[p + kL] x[n-k], with
// K = ceil(NTAPS/L) products per output, all evaluated in one cycle.
//
// Interface: `ce` marks each output-rate cycle. On the first of every L of
// them (phase 0) the filter consumes `in_data` and says so on `in_take` in
// the same cycle; the caller must hold the next input sample there. Each
// enabled cycle produces one output: out_data/out_valid are registered, one
// cycle after the `ce` that made them. Results are rounded and saturated to
// DW bits.
//
// From the document: raised-cosine type, 129 taps, 16-bit coefficients, the
// rates, roll-offs, cutoffs and sample rates of the profile table. Own
// choices: polyphase form, the pull-style input, the gain normalisation and
// reading "cutoff" as the 6 dB frequency.
module fir_interp
  import dif_pkg::*;
#(
  parameter int L        = 4,
  parameter int TAPS     = NTAPS,
  parameter int FS_KHZ   = 61440,
  parameter int FC_KHZ   = 2800,
  parameter int BETA_PPM = 220000,
  parameter int DW       = BB_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic signed [DW-1:0] in_data,
  output logic                 in_take,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);
  localparam int K   = (TAPS + L - 1) / L;   // products per output
  localparam int PHW = (L > 1) ? $clog2(L) : 1;
  localparam int AW  = DW + COEF_W + $clog2(K) + 1;

  typedef logic signed [COEF_W-1:0] coef_t [L*K];   // index p*K + k

  function automatic coef_t make_coefs();
    coef_t c;
    for (int p = 0; p < L; p++)
      for (int k = 0; k < K; k++)
        c[p*K + k] = (p + k * L < TAPS)
                ? COEF_W'(rc_coef(p + k * L, TAPS, FS_KHZ, FC_KHZ, BETA_PPM, L))
                : '0;
    return c;
  endfunction

  localparam coef_t COEF = make_coefs();

  logic signed [DW-1:0] dl   [K];   // dl[0] is the newest input sample
  logic signed [DW-1:0] dl_n [K];
  logic [PHW-1:0]       phase;
  logic signed [AW-1:0] acc;

  assign in_take = ce && (phase == '0);

  always_comb begin
    dl_n = dl;
    if (in_take) begin
      for (int k = K - 1; k > 0; k--) dl_n[k] = dl[k-1];
      dl_n[0] = in_data;
    end
    acc = '0;
    for (int k = 0; k < K; k++)
      acc += AW'(COEF[int'(phase) * K + k] * dl_n[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int k = 0; k < K; k++) dl[k] <= '0;
    end else begin
      out_valid <= ce;
      if (ce) begin
        dl       <= dl_n;
        phase    <= (phase == PHW'(L - 1)) ? '0 : phase + 1'b1;
        out_data <= DW'(sat(round_shift(64'(acc), COEF_FRAC), DW));
      end
    end
  end
endmodule
