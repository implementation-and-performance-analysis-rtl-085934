// dif_pkg: types, sizes and constant functions shared by the digital IF
// transceiver.
//
// The transceiver is rebuilt for one of four air-interface profiles: HSDPA
// and the 7 MHz, 3.5 MHz and 1.75 MHz profiles of IEEE 802.16d WiMAX. Each
// profile fixes the IF sample rate, the interpolation and decimation rates
// and the raised-cosine filter design (roll-off, cutoff, 129 taps, 16-bit
// coefficients). profile_cfg() returns those numbers for a profile.
// rc_coef() designs one quantised raised-cosine tap at elaboration time and
// sin_table() builds the NCO sine ROM, so no coefficient file is needed.
//
// Numbers from the profile table: rates x4/x4/x8/x16 (interpolation),
// x2/x4/x8/x16 (decimation), roll-off 0.22 (HSDPA) and 0.115 (WiMAX),
// cutoffs 2.8/3.5/2 MHz, 129 taps and 16-bit coefficients. The 1.75 MHz
// profile uses two cascaded 129-tap filters: x2 at 8 MHz with a 1.2 MHz
// cutoff and x8 at 64 MHz with a 2 MHz cutoff. HSDPA runs at 61.44 MHz
// (ADC clock and DAC data rate of 4 x 61.44 MHz); WiMAX at 64 MHz.
// Own choices: sample and NCO widths, the reading of "cutoff" as the
// raised-cosine 6 dB frequency 1/(2T), and the coefficient normalisation
// (DC gain equal to the rate change, Q1.15).
package dif_pkg;

  typedef enum logic [1:0] {
    PROF_HSDPA    = 2'd0,
    PROF_WIMAX_7  = 2'd1,
    PROF_WIMAX_35 = 2'd2,
    PROF_WIMAX_175 = 2'd3
  } profile_e;

  localparam int NTAPS    = 129;  // taps of every FIR
  localparam int COEF_W   = 16;   // coefficient width
  localparam int COEF_FRAC = 15;  // coefficients are Q1.15
  localparam int BB_W     = 16;   // baseband sample width (I or Q)
  localparam int DAC_W    = 16;   // width of the words sent to the DAC
  localparam int ADC_W    = 14;   // ADC sample width
  localparam int PHASE_W  = 32;   // NCO phase accumulator width
  localparam int LUT_AW   = 10;   // NCO sine ROM address width
  localparam int AMP_W    = 16;   // NCO amplitude width (Q1.15)

  // One filter stage of a profile: rate change, sample rate at the high-rate
  // side of the stage, cutoff and roll-off.
  typedef struct packed {
    int  rate;      // 1 means the stage is absent
    int  fs_khz;    // sample rate on the high-rate side
    int  fc_khz;    // 6 dB cutoff
    int  beta_ppm;  // roll-off factor in millionths
  } fir_stage_t;

  typedef struct packed {
    int         fs_khz;     // IF sample rate = system clock
    fir_stage_t tx_a;       // first (low-rate) interpolation stage
    fir_stage_t tx_b;       // second (high-rate) interpolation stage
    fir_stage_t rx_b;       // first (high-rate) decimation stage
    fir_stage_t rx_a;       // second (low-rate) decimation stage
    int         f1_khz;     // NCO frequency of FA1
    int         f2_khz;     // NCO frequency of FA2
  } profile_cfg_t;

  function automatic profile_cfg_t profile_cfg(profile_e p);
    profile_cfg_t c;
    fir_stage_t none;
    none = '{rate: 1, fs_khz: 1, fc_khz: 1, beta_ppm: 0};
    case (p)
      PROF_HSDPA: begin
        c.fs_khz = 61440;
        c.tx_a = none;
        c.tx_b = '{rate: 4, fs_khz: 61440, fc_khz: 2800, beta_ppm: 220000};
        c.rx_b = '{rate: 2, fs_khz: 61440, fc_khz: 2800, beta_ppm: 220000};
        c.rx_a = none;
        c.f1_khz = 16160; c.f2_khz = 20960;
      end
      PROF_WIMAX_7: begin
        c.fs_khz = 64000;
        c.tx_a = none;
        c.tx_b = '{rate: 4, fs_khz: 64000, fc_khz: 3500, beta_ppm: 115000};
        c.rx_b = '{rate: 4, fs_khz: 64000, fc_khz: 3500, beta_ppm: 115000};
        c.rx_a = none;
        c.f1_khz = 12000; c.f2_khz = 20000;
      end
      PROF_WIMAX_35: begin
        c.fs_khz = 64000;
        c.tx_a = none;
        c.tx_b = '{rate: 8, fs_khz: 64000, fc_khz: 2000, beta_ppm: 115000};
        c.rx_b = '{rate: 8, fs_khz: 64000, fc_khz: 2000, beta_ppm: 115000};
        c.rx_a = none;
        c.f1_khz = 12000; c.f2_khz = 20000;
      end
      default: begin // PROF_WIMAX_175
        c.fs_khz = 64000;
        c.tx_a = '{rate: 2, fs_khz: 8000,  fc_khz: 1200, beta_ppm: 115000};
        c.tx_b = '{rate: 8, fs_khz: 64000, fc_khz: 2000, beta_ppm: 115000};
        c.rx_b = '{rate: 8, fs_khz: 64000, fc_khz: 2000, beta_ppm: 115000};
        c.rx_a = '{rate: 2, fs_khz: 8000,  fc_khz: 1200, beta_ppm: 115000};
        c.f1_khz = 12000; c.f2_khz = 20000;
      end
    endcase
    return c;
  endfunction

  // NCO frequency tuning word: round(f / fs * 2^PHASE_W).
  function automatic logic [PHASE_W-1:0] ftw_of(int f_khz, int fs_khz);
    real r;
    r = (real'(f_khz) / real'(fs_khz)) * (2.0 ** PHASE_W);
    return PHASE_W'(longint'(r));
  endfunction

  // Continuous raised-cosine pulse at t = n / fs, with 1/(2T) = fc.
  function automatic real rc_pulse(int n, real fs, real fc, real beta);
    real pi, x, s, den;
    pi = 3.14159265358979323846;
    x  = 2.0 * fc * real'(n) / fs;          // t / T
    s  = (n == 0) ? 1.0 : $sin(pi * x) / (pi * x);
    den = 1.0 - (2.0 * beta * x) ** 2;
    if (den > -1.0e-9 && den < 1.0e-9)
      return (pi / 4.0) * $sin(pi / (2.0 * beta)) / (pi / (2.0 * beta));
    return s * $cos(pi * beta * x) / den;
  endfunction

  // Tap k (0..ntaps-1) of the symmetric raised-cosine FIR, normalised so the
  // sum of all taps equals `gain`, in Q1.15, rounded and saturated to 16 bits.
  function automatic int rc_coef(int k, int ntaps, int fs_khz, int fc_khz,
                                 int beta_ppm, int gain);
    real fs, fc, beta, sum, v;
    int  mid, q;
    fs   = real'(fs_khz);
    fc   = real'(fc_khz);
    beta = real'(beta_ppm) / 1.0e6;
    mid  = (ntaps - 1) / 2;
    sum  = 0.0;
    for (int i = 0; i < ntaps; i++) sum += rc_pulse(i - mid, fs, fc, beta);
    v = rc_pulse(k - mid, fs, fc, beta) * real'(gain) / sum
        * (2.0 ** COEF_FRAC);
    q = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  // Full-period sine ROM, 2^LUT_AW entries of round(32767 * sin(2 pi i / N)).
  typedef logic signed [AMP_W-1:0] sin_rom_t [2**LUT_AW];
  function automatic sin_rom_t sin_table();
    sin_rom_t t;
    real v;
    for (int i = 0; i < 2**LUT_AW; i++) begin
      v = 32767.0 * $sin(2.0 * 3.14159265358979323846 * real'(i)
                         / real'(2**LUT_AW));
      t[i] = AMP_W'((v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5));
    end
    return t;
  endfunction

  // Round-to-nearest arithmetic right shift and saturation to `w` bits.
  function automatic logic signed [63:0] round_shift(logic signed [63:0] v,
                                                     int sh);
    if (sh <= 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  function automatic logic signed [63:0] sat(logic signed [63:0] v, int w);
    logic signed [63:0] mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 64'sd1;
    mn = -(64'sd1 <<< (w - 1));
    if (v > mx) return mx;
    if (v < mn) return mn;
    return v;
  endfunction

  function automatic int clog2i(int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

endpackage
