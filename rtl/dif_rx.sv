// dif_rx: digital down-converter and channeliser for two FAs (uplink).
//
// The band-pass-sampled ADC output carries both frequency assignments. It is
// split into two paths; each path multiplies it by its NCO's cos and -sin
// (moving that FA to 0 Hz) and the resulting I and Q streams pass through
// raised-cosine decimation filters that remove the other FA and the mixing
// images and lower the rate to the modem's.
//
// PROFILE selects the build: HSDPA (ADC at 61.44 MHz, /2, NCOs 16.16 and
// 20.96 MHz) or WiMAX at 64 MHz: 7 MHz (/4), 3.5 MHz (/8) or 1.75 MHz (/8 at
// 64 MHz then /2 at 8 MHz), NCOs 12 and 20 MHz. The NCO tuning words are
// run-time inputs.
//
// Timing: clk is the ADC sample clock, one ADC sample per clock. bb_valid
// pulses once per output sample (every 2, 4, 8 or 16 clocks) and then all
// four outputs bb_i[0..1], bb_q[0..1] (FA1, FA2) hold a new sample.
//
// The structure, rates and frequencies are the document's; the widths,
// scaling and the order of the 1.75 MHz profile's two filters are this
// design's reading.
module dif_rx
  import dif_pkg::*;
#(
  parameter profile_e PROFILE = PROF_HSDPA
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PHASE_W-1:0]      ftw1,
  input  logic [PHASE_W-1:0]      ftw2,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic signed [BB_W-1:0]  bb_i [2],
  output logic signed [BB_W-1:0]  bb_q [2],
  output logic                    bb_valid
);
  localparam profile_cfg_t CFG = profile_cfg(PROFILE);
  localparam fir_stage_t SA = CFG.rx_a;
  localparam fir_stage_t SB = CFG.rx_b;

  logic run, mix_vld;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      run     <= 1'b0;
      mix_vld <= 1'b0;
    end else begin
      run     <= 1'b1;
      mix_vld <= run;
    end

  logic signed [ADC_W-1:0] adc_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) adc_q <= '0;
    else        adc_q <= adc_data;

  logic signed [AMP_W-1:0] c1, s1, c2, s2;
  nco u_nco1 (.clk, .rst_n, .en(run), .ftw(ftw1), .cos_o(c1), .sin_o(s1));
  nco u_nco2 (.clk, .rst_n, .en(run), .ftw(ftw2), .cos_o(c2), .sin_o(s2));

  // Path order: 0 FA1 I, 1 FA1 Q, 2 FA2 I, 3 FA2 Q.
  logic signed [BB_W-1:0] mixed [4];
  logic signed [BB_W-1:0] dec_b [4];
  logic signed [BB_W-1:0] dec   [4];
  logic [3:0]             vld_b, vld;

  ddc_mixer #(.XW(ADC_W), .OW(BB_W)) u_mix1 (
    .clk, .rst_n, .x_in(adc_q), .cos_in(c1), .sin_in(s1),
    .i_out(mixed[0]), .q_out(mixed[1])
  );
  ddc_mixer #(.XW(ADC_W), .OW(BB_W)) u_mix2 (
    .clk, .rst_n, .x_in(adc_q), .cos_in(c2), .sin_in(s2),
    .i_out(mixed[2]), .q_out(mixed[3])
  );

  for (genvar p = 0; p < 4; p++) begin : g_path
    fir_decim #(
      .M(SB.rate), .FS_KHZ(SB.fs_khz), .FC_KHZ(SB.fc_khz),
      .BETA_PPM(SB.beta_ppm), .DW(BB_W)
    ) u_fir_b (
      .clk, .rst_n, .in_valid(mix_vld), .in_data(mixed[p]),
      .out_valid(vld_b[p]), .out_data(dec_b[p])
    );
    if (SA.rate > 1) begin : g_two
      fir_decim #(
        .M(SA.rate), .FS_KHZ(SA.fs_khz), .FC_KHZ(SA.fc_khz),
        .BETA_PPM(SA.beta_ppm), .DW(BB_W)
      ) u_fir_a (
        .clk, .rst_n, .in_valid(vld_b[p]), .in_data(dec_b[p]),
        .out_valid(vld[p]), .out_data(dec[p])
      );
    end else begin : g_one
      assign dec[p] = dec_b[p];
      assign vld[p] = vld_b[p];
    end
  end

  assign bb_i[0]  = dec[0];
  assign bb_q[0]  = dec[1];
  assign bb_i[1]  = dec[2];
  assign bb_q[1]  = dec[3];
  assign bb_valid = vld[0];

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    vld == {4{vld[0]}});
endmodule
