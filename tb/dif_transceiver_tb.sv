// dif_transceiver_tb: end-to-end test of the digital IF transceiver at its
// default build (HSDPA, 61.44 MHz IF sample clock, 129-tap filters).
//
// The DAC I output is looped back into the ADC input (dropping the two low
// bits, 16 to 14), so the uplink path receives the downlink's two FAs at
// 16.16 and 20.96 MHz. The modem model holds a random I/Q symbol per FA for
// 800 clocks. After the four filter stages have settled, each receive FA must
// carry its own transmit symbol:
//   rx_f = (tx_i_f + j tx_q_f) / 4 * exp(j d_f)
// (1/2 from the combiner, 1/4 from the loopback, 1/2 from mixing, 4 from the
// 14- to 16-bit scaling) with d_f a constant rotation from the loop delay,
// measured on a calibration segment. Then the receive NCOs are swapped at
// run time, after which receive FA1 must carry transmit FA2 and vice versa.
//
// Events counted (each must occur): modem samples pulled, receive outputs,
// checked symbols per receive FA, NCO retunes with a verified result.
module dif_transceiver_tb;
  import dif_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] tx_ftw1, tx_ftw2, rx_ftw1, rx_ftw2;
  logic signed [15:0] tx_bb_i [2], tx_bb_q [2], rx_bb_i [2], rx_bb_q [2];
  logic tx_bb_take, dac_valid, rx_bb_valid;
  logic signed [15:0] dac_i, dac_q;
  logic signed [13:0] adc_data;
  int checks = 0, failures = 0;

  dif_transceiver dut (
    .clk, .rst_n, .tx_ftw1, .tx_ftw2, .rx_ftw1, .rx_ftw2,
    .tx_bb_i, .tx_bb_q, .tx_bb_take, .dac_i, .dac_q, .dac_valid,
    .adc_data, .rx_bb_i, .rx_bb_q, .rx_bb_valid
  );

  assign adc_data = 14'(dac_i >>> 2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
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

  int n_take = 0, n_rx = 0, n_retune_ok = 0, n_sym [2];
  int cyc = 0, last_take = -1, last_rx = -1;
  real maxerr = 0.0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_bb_take) begin
      if (last_take >= 0) chk(cyc - last_take == 4, "downlink x4 rate");
      last_take = cyc;
      n_take++;
    end
    if (rx_bb_valid) begin
      if (last_rx >= 0) chk(cyc - last_rx == 2, "uplink /2 rate");
      last_rx = cyc;
      n_rx++;
    end
  end

  real d [2];
  int  src [2] = '{0, 1};     // transmit FA carried by each receive FA

  task automatic new_symbols();
    for (int f = 0; f < 2; f++) begin
      tx_bb_i[f] = 16'($urandom_range(0, 24000) - 12000);
      tx_bb_q[f] = 16'($urandom_range(0, 24000) - 12000);
    end
  endtask

  function automatic real angle_of(int f);
    return $atan2(real'(tx_bb_q[src[f]]), real'(tx_bb_i[src[f]]));
  endfunction

  task automatic calibrate();
    new_symbols();
    repeat (600) @(negedge clk);
    for (int f = 0; f < 2; f++)
      d[f] = $atan2(real'(rx_bb_q[f]), real'(rx_bb_i[f])) - angle_of(f);
  endtask

  // returns the number of failed comparisons
  task automatic segment(output int bad);
    bad = 0;
    new_symbols();
    repeat (600) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int f = 0; f < 2; f++) begin
        real mag, a, ei, eq, e;
        mag = $sqrt(real'(tx_bb_i[src[f]]) ** 2 + real'(tx_bb_q[src[f]]) ** 2) / 4.0;
        a   = angle_of(f) + d[f];
        ei  = mag * $cos(a);
        eq  = mag * $sin(a);
        e   = $sqrt((ei - real'(rx_bb_i[f])) ** 2 + (eq - real'(rx_bb_q[f])) ** 2);
        if (e > maxerr) maxerr = e;
        chk(e < 100.0, $sformatf("rx FA%0d %0d,%0d exp %0.1f,%0.1f", f + 1,
                                 rx_bb_i[f], rx_bb_q[f], ei, eq));
        if (e >= 100.0) bad++;
        if (n == 0) n_sym[f]++;
      end
    end
  endtask

  initial begin
    int bad;
    n_sym[0] = 0; n_sym[1] = 0;
    tx_ftw1 = ftw_of(16160, 61440);
    tx_ftw2 = ftw_of(20960, 61440);
    rx_ftw1 = tx_ftw1;
    rx_ftw2 = tx_ftw2;
    for (int f = 0; f < 2; f++) begin tx_bb_i[f] = '0; tx_bb_q[f] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    calibrate();
    repeat (12) segment(bad);
    // run-time retune: swap the receive NCOs
    rx_ftw1 = tx_ftw2;
    rx_ftw2 = tx_ftw1;
    src = '{1, 0};
    calibrate();
    repeat (6) begin
      segment(bad);
      if (bad == 0) n_retune_ok++;
    end
    chk(n_take > 0, "no modem samples pulled");
    chk(n_rx > 0, "no receive outputs");
    chk(n_sym[0] > 0 && n_sym[1] > 0, "both FAs checked");
    chk(n_retune_ok > 0, "retune never verified");
    chk(dac_valid, "dac_valid");
    $display("events: modem pulls %0d, rx outputs %0d, symbols FA1 %0d FA2 %0d, retuned segments ok %0d",
             n_take, n_rx, n_sym[0], n_sym[1], n_retune_ok);
    $display("max error %0.1f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
