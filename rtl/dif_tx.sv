// dif_tx: digital up-converter for two frequency assignments (downlink).
//
// Each FA arrives from the modem as a baseband I/Q pair. The four baseband
// streams (FA1 I, FA1 Q, FA2 I, FA2 Q) are raised to the IF sample rate by
// identical raised-cosine interpolation filters, each FA is shifted to its
// NCO frequency by a complex quadrature modulator (DCQM), and the two FAs
// are added into one I and one Q word for the two-channel DAC:
//   S_I = I1 cos w1t - Q1 sin w1t + I2 cos w2t - Q2 sin w2t
//   S_Q = I1 sin w1t + Q1 cos w1t + I2 sin w2t + Q2 cos w2t
// The DAC chip, outside this module, interpolates further and applies the
// final complex modulation to the 80 MHz IF.
//
// PROFILE selects the build: HSDPA (x4 at 61.44 MHz, FA NCOs 16.16 and
// 20.96 MHz) or WiMAX 7 MHz (x4), 3.5 MHz (x8) or 1.75 MHz (x2 at 8 MHz
// followed by x8 at 64 MHz), FA NCOs 12 and 20 MHz. The NCO tuning words
// are run-time inputs (ftw = f / fs * 2^32), so the FA positions can be
// reprogrammed without a rebuild.
//
// Timing: clk is the IF sample clock; one S_I/S_Q pair leaves per clock
// (dac_valid high once the pipeline has started). The modem side is pulled:
// `bb_take` pulses once per baseband sample period (every 4, 8 or 16 clocks)
// and the bb_* inputs present in that cycle are consumed.
//
// The chain, rates and frequencies are the document's; the pull interface,
// the widths and the x2-then-x8 split of the 1.75 MHz profile's two filters
// are this design's reading.
module dif_tx
  import dif_pkg::*;
#(
  parameter profile_e PROFILE = PROF_HSDPA
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      ftw1,
  input  logic [PHASE_W-1:0]      ftw2,
  input  logic signed [BB_W-1:0]  bb_i [2],
  input  logic signed [BB_W-1:0]  bb_q [2],
  output logic                    bb_take,
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q,
  output logic                    dac_valid
);
  localparam profile_cfg_t CFG = profile_cfg(PROFILE);
  localparam fir_stage_t SA = CFG.tx_a;
  localparam fir_stage_t SB = CFG.tx_b;

  // Path order: 0 FA1 I, 1 FA1 Q, 2 FA2 I, 3 FA2 Q.
  logic signed [BB_W-1:0] src   [4];
  logic signed [BB_W-1:0] mid   [4];
  logic signed [BB_W-1:0] up    [4];
  logic [3:0]             take_b, take_a, vld_b;
  logic                   run;

  assign src[0] = bb_i[0];
  assign src[1] = bb_q[0];
  assign src[2] = bb_i[1];
  assign src[3] = bb_q[1];

  // The filters start together one cycle after reset is released.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) run <= 1'b0;
    else        run <= 1'b1;

  for (genvar p = 0; p < 4; p++) begin : g_path
    if (SA.rate > 1) begin : g_two
      logic vld_a_unused;
      fir_interp #(
        .L(SA.rate), .FS_KHZ(SA.fs_khz), .FC_KHZ(SA.fc_khz),
        .BETA_PPM(SA.beta_ppm), .DW(BB_W)
      ) u_fir_a (
        .clk, .rst_n, .ce(take_b[p]), .in_data(src[p]), .in_take(take_a[p]),
        .out_valid(vld_a_unused), .out_data(mid[p])
      );
    end else begin : g_one
      assign mid[p]    = src[p];
      assign take_a[p] = take_b[p];
    end
    fir_interp #(
      .L(SB.rate), .FS_KHZ(SB.fs_khz), .FC_KHZ(SB.fc_khz),
      .BETA_PPM(SB.beta_ppm), .DW(BB_W)
    ) u_fir_b (
      .clk, .rst_n, .ce(run), .in_data(mid[p]), .in_take(take_b[p]),
      .out_valid(vld_b[p]), .out_data(up[p])
    );
  end

  assign bb_take = take_a[0];

  // FA1 and FA2 oscillators and modulators.
  logic signed [AMP_W-1:0] c1, s1, c2, s2;
  logic signed [BB_W-1:0]  m1_i, m1_q, m2_i, m2_q;

  nco u_nco1 (.clk, .rst_n, .en(run), .ftw(ftw1), .cos_o(c1), .sin_o(s1));
  nco u_nco2 (.clk, .rst_n, .en(run), .ftw(ftw2), .cos_o(c2), .sin_o(s2));

  dcqm #(.DW(BB_W)) u_dcqm1 (
    .clk, .rst_n, .i_in(up[0]), .q_in(up[1]), .cos_in(c1), .sin_in(s1),
    .s_i(m1_i), .s_q(m1_q)
  );
  dcqm #(.DW(BB_W)) u_dcqm2 (
    .clk, .rst_n, .i_in(up[2]), .q_in(up[3]), .cos_in(c2), .sin_in(s2),
    .s_i(m2_i), .s_q(m2_q)
  );

  fa_combiner #(.DW(BB_W), .OW(DAC_W)) u_comb (
    .clk, .rst_n, .fa1_i(m1_i), .fa1_q(m1_q), .fa2_i(m2_i), .fa2_q(m2_q),
    .out_i(dac_i), .out_q(dac_q)
  );

  // Valid follows the filter output through the DCQM and combiner registers.
  logic [1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[0], vld_b[0]};
  assign dac_valid = vpipe[1];

  // The four paths share one timing, so they must agree.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (take_b == {4{take_b[0]}}) && (take_a == {4{take_a[0]}}) &&
    (vld_b == {4{vld_b[0]}}));
endmodule
