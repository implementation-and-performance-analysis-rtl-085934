// dif_tx_tb: self-checking test of the two-FA digital up-converter (HSDPA
// build: x4 interpolation at 61.44 MHz, NCOs at 16.16 and 20.96 MHz).
//
// The modem side is modelled as a source of held baseband symbols: each FA
// sends a constant I/Q value for 600 clocks, then a new random one. Once the
// interpolation filters have settled on a symbol, the DAC words must match
//   S_I = (I1 cos p1 - Q1 sin p1 + I2 cos p2 - Q2 sin p2) / 2
//   S_Q = (I1 sin p1 + Q1 cos p1 + I2 sin p2 + Q2 cos p2) / 2
// with p = 2 pi f n / fs computed here from the tuning words. The pipeline
// delay between the NCO phase and the DAC word is found once by searching a
// few lags, then held. Also checks the x4 input rate (one bb_take every 4
// clocks) and that dac_valid stays high. A mid-run retune of FA2 to 8 MHz
// is followed by the same checks.
module dif_tx_tb;
  import dif_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] ftw1, ftw2;
  logic signed [15:0] bb_i [2], bb_q [2];
  logic bb_take, dac_valid;
  logic signed [15:0] dac_i, dac_q;
  int checks = 0, failures = 0;

  dif_tx #(.PROFILE(PROF_HSDPA)) dut (
    .clk, .rst_n, .ftw1, .ftw2, .bb_i, .bb_q, .bb_take, .dac_i, .dac_q,
    .dac_valid
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // NCO phase (in cycles of 2^32) of each clock since reset, kept per FA so a
  // retune is tracked exactly.
  longint cyc = 0;
  real ph1 [64], ph2 [64];   // ring buffers indexed by cycle mod 64
  real acc1 = 0.0, acc2 = 0.0;
  int  last_take = -1;
  int  n_take = 0;

  always @(posedge clk) if (rst_n) begin
    ph1[cyc % 64] = acc1;
    ph2[cyc % 64] = acc2;
    // the NCOs start stepping one clock after reset is released
    if (cyc > 0) begin
      acc1 += real'(ftw1) / 4294967296.0;
      acc2 += real'(ftw2) / 4294967296.0;
    end
    if (acc1 >= 1.0) acc1 -= 1.0;
    if (acc2 >= 1.0) acc2 -= 1.0;
    if (bb_take) begin
      if (last_take >= 0) chk(int'(cyc) - last_take == 4, "bb_take period");
      last_take = int'(cyc);
      n_take++;
    end
    cyc++;
  end

  function automatic real phase_at(bit fa2, longint c);
    if (c < 0) return 0.0;
    return fa2 ? ph2[c % 64] : ph1[c % 64];
  endfunction

  function automatic void expect_dac(int lag, ref real ei, ref real eq);
    real a1, a2;
    a1 = 2.0 * PI * phase_at(1'b0, cyc - lag);
    a2 = 2.0 * PI * phase_at(1'b1, cyc - lag);
    ei = (real'(bb_i[0]) * $cos(a1) - real'(bb_q[0]) * $sin(a1)
        + real'(bb_i[1]) * $cos(a2) - real'(bb_q[1]) * $sin(a2)) / 2.0;
    eq = (real'(bb_i[0]) * $sin(a1) + real'(bb_q[0]) * $cos(a1)
        + real'(bb_i[1]) * $sin(a2) + real'(bb_q[1]) * $cos(a2)) / 2.0;
  endfunction

  int lag = -1;
  real maxerr = 0.0;

  // Checks the settled part of one held symbol (samples 300..599).
  task automatic hold_symbol();
    bb_i[0] = 16'($urandom_range(0, 24000) - 12000);
    bb_q[0] = 16'($urandom_range(0, 24000) - 12000);
    bb_i[1] = 16'($urandom_range(0, 24000) - 12000);
    bb_q[1] = 16'($urandom_range(0, 24000) - 12000);
    repeat (300) @(negedge clk);
    if (lag < 0) begin
      real best, e, ei, eq;
      best = 1.0e30;
      for (int l = 0; l < 12; l++) begin
        expect_dac(l, ei, eq);
        e = (ei - real'(dac_i)) ** 2 + (eq - real'(dac_q)) ** 2;
        if (e < best) begin best = e; lag = l; end
      end
      $display("pipeline lag %0d cycles", lag);
    end
    for (int n = 0; n < 300; n++) begin
      real ei, eq, e;
      @(negedge clk);
      expect_dac(lag, ei, eq);
      e = (ei - real'(dac_i)) ** 2 + (eq - real'(dac_q)) ** 2;
      e = $sqrt(e);
      if (e > maxerr) maxerr = e;
      chk(e < 200.0, $sformatf("n=%0d cyc=%0d dac %0d,%0d exp %0.1f,%0.1f", n, cyc, dac_i, dac_q, ei, eq));
      chk(dac_valid, "dac_valid");
    end
  endtask

  initial begin
    ftw1 = ftw_of(16160, 61440);
    ftw2 = ftw_of(20960, 61440);
    for (int f = 0; f < 2; f++) begin bb_i[f] = '0; bb_q[f] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (20) hold_symbol();
    ftw2 = ftw_of(8000, 61440);
    repeat (10) hold_symbol();
    chk(n_take > 1000, "inputs consumed");
    $display("max error %0.1f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
