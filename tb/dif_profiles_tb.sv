// dif_profiles_tb: runs the downlink-to-uplink loopback for all four builds
// of the transceiver side by side: HSDPA (x4 / /2 at 61.44 MHz) and the
// WiMAX 7 MHz (x4 / /4), 3.5 MHz (x8 / /8) and 1.75 MHz (x16 / /16, two
// cascaded filters each way) profiles at 64 MHz. Each build must reproduce
// its transmitted symbols on both FAs at the profile's rates.
module dif_profiles_tb;
  import dif_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic done [4];
  int   c [4], f [4];
  int   checks, failures;

  profile_loopback #(.PROFILE(PROF_HSDPA))     u_hsdpa (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  profile_loopback #(.PROFILE(PROF_WIMAX_7))   u_w7    (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  profile_loopback #(.PROFILE(PROF_WIMAX_35))  u_w35   (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  profile_loopback #(.PROFILE(PROF_WIMAX_175)) u_w175  (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));

  always #5 clk = ~clk;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    total();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
