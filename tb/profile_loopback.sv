// profile_loopback: loopback checker for one transceiver build, used by
// dif_profiles_tb.
//
// Instantiates dif_transceiver for PROFILE with its NCOs on that profile's
// FA frequencies, loops the DAC I word back into the ADC (16 to 14 bits) and
// sends held random I/Q symbols on both FAs. After each symbol has settled
// through the interpolation and decimation filters, each receive FA must
// equal (tx_i + j tx_q) / 4 rotated by a constant angle (measured once).
// Also checks the modem pull period (the profile's total interpolation rate)
// and the receive output period (its total decimation rate). Raises `done`
// when finished and reports its counts on `checks` / `failures`.
module profile_loopback
  import dif_pkg::*;
#(
  parameter profile_e PROFILE = PROF_HSDPA,
  parameter int       SEGMENTS = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam profile_cfg_t CFG = profile_cfg(PROFILE);
  localparam int UP   = CFG.tx_a.rate * CFG.tx_b.rate;
  localparam int DOWN = CFG.rx_a.rate * CFG.rx_b.rate;
  // settling time: all four filters' spans at their own rates, plus margin
  localparam int SETTLE = 129 * (CFG.tx_a.rate > 1 ? 8 : 1)
                        + 129 * (CFG.rx_a.rate > 1 ? 8 : 1) + 600;

  logic [31:0] ftw1, ftw2;
  logic signed [15:0] tx_bb_i [2], tx_bb_q [2], rx_bb_i [2], rx_bb_q [2];
  logic tx_bb_take, dac_valid, rx_bb_valid;
  logic signed [15:0] dac_i, dac_q;
  logic signed [13:0] adc_data;

  assign ftw1 = ftw_of(CFG.f1_khz, CFG.fs_khz);
  assign ftw2 = ftw_of(CFG.f2_khz, CFG.fs_khz);
  assign adc_data = 14'(dac_i >>> 2);

  dif_transceiver #(.PROFILE(PROFILE)) dut (
    .clk, .rst_n, .tx_ftw1(ftw1), .tx_ftw2(ftw2), .rx_ftw1(ftw1),
    .rx_ftw2(ftw2), .tx_bb_i, .tx_bb_q, .tx_bb_take, .dac_i, .dac_q,
    .dac_valid, .adc_data, .rx_bb_i, .rx_bb_q, .rx_bb_valid
  );

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL [%s] %s", PROFILE.name(), msg);
    end
  endtask

  int cyc = 0, last_take = -1, last_rx = -1, n_take = 0, n_rx = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_bb_take) begin
      if (last_take >= 0) chk(cyc - last_take == UP, "modem pull period");
      last_take = cyc;
      n_take++;
    end
    if (rx_bb_valid) begin
      if (last_rx >= 0) chk(cyc - last_rx == DOWN, "receive output period");
      last_rx = cyc;
      n_rx++;
    end
  end

  real d [2];
  real maxerr = 0.0;

  task automatic new_symbols();
    for (int f = 0; f < 2; f++) begin
      tx_bb_i[f] = 16'($urandom_range(0, 24000) - 12000);
      tx_bb_q[f] = 16'($urandom_range(0, 24000) - 12000);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int f = 0; f < 2; f++) begin tx_bb_i[f] = '0; tx_bb_q[f] = '0; end
    @(posedge rst_n);
    new_symbols();
    repeat (SETTLE) @(negedge clk);
    for (int f = 0; f < 2; f++)
      d[f] = $atan2(real'(rx_bb_q[f]), real'(rx_bb_i[f]))
           - $atan2(real'(tx_bb_q[f]), real'(tx_bb_i[f]));
    for (int s = 0; s < SEGMENTS; s++) begin
      new_symbols();
      repeat (SETTLE) @(negedge clk);
      for (int n = 0; n < 4 * DOWN; n++) begin
        @(negedge clk);
        for (int f = 0; f < 2; f++) begin
          real mag, a, ei, eq, e;
          mag = $sqrt(real'(tx_bb_i[f]) ** 2 + real'(tx_bb_q[f]) ** 2) / 4.0;
          a   = $atan2(real'(tx_bb_q[f]), real'(tx_bb_i[f])) + d[f];
          ei  = mag * $cos(a);
          eq  = mag * $sin(a);
          e   = $sqrt((ei - real'(rx_bb_i[f])) ** 2 + (eq - real'(rx_bb_q[f])) ** 2);
          if (e > maxerr) maxerr = e;
          chk(e < 100.0, $sformatf("rx FA%0d %0d,%0d exp %0.1f,%0.1f", f + 1,
                                   rx_bb_i[f], rx_bb_q[f], ei, eq));
        end
      end
    end
    chk(n_take > 0 && n_rx > 0, "traffic in both directions");
    $display("[%s] x%0d up, /%0d down: pulls %0d, outputs %0d, max error %0.1f LSB",
             PROFILE.name(), UP, DOWN, n_take, n_rx, maxerr);
    done = 1'b1;
  end
endmodule
