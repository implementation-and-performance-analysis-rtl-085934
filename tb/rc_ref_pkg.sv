// rc_ref_pkg: reference models for the testbenches.
//
// An independent description of the raised-cosine taps (written from the
// textbook pulse h(t) = sinc(t/T) cos(pi b t/T) / (1 - (2 b t/T)^2) with
// 1/(2T) = fc, normalised to a given DC gain in Q1.15) and of the round /
// saturate arithmetic, used to predict filter outputs.
package rc_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic real pulse(real t_over_T, real b);
    real s, d;
    if (t_over_T == 0.0) s = 1.0;
    else s = $sin(PI * t_over_T) / (PI * t_over_T);
    d = 1.0 - 4.0 * b * b * t_over_T * t_over_T;
    if (d < 1.0e-9 && d > -1.0e-9)
      return (PI / 4.0) * $sin(PI / (2.0 * b)) * (2.0 * b) / PI;
    return s * $cos(PI * b * t_over_T) / d;
  endfunction

  // taps[0..n-1], sum normalised to gain, Q1.15 integers
  function automatic void make_taps(ref int taps[], input int n, real fs_mhz,
                                    real fc_mhz, real b, real gain);
    real h[];
    real tot;
    h = new[n];
    taps = new[n];
    tot = 0.0;
    for (int k = 0; k < n; k++) begin
      h[k] = pulse(real'(k - (n - 1) / 2) * 2.0 * fc_mhz / fs_mhz, b);
      tot += h[k];
    end
    for (int k = 0; k < n; k++) begin
      real v;
      v = h[k] / tot * gain * 32768.0;
      taps[k] = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
    end
  endfunction

  function automatic longint rshift_round(longint v, int sh);
    if (sh <= 0) return v;
    return (v + (longint'(1) << (sh - 1))) >>> sh;
  endfunction

  function automatic longint clip(longint v, int w);
    longint mx, mn;
    mx = (longint'(1) << (w - 1)) - 1;
    mn = -(longint'(1) << (w - 1));
    return (v > mx) ? mx : (v < mn) ? mn : v;
  endfunction
endpackage
