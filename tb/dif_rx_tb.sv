// dif_rx_tb: self-checking test of the two-FA digital down-converter (HSDPA
// build: ADC at 61.44 MHz, NCOs at 16.16 and 20.96 MHz, /2 decimation).
//
// The ADC input is the sum of two tones, one exactly on each FA's centre:
//   x[m] = A1 cos(2 pi f1 m / fs + a1) + A2 cos(2 pi f2 m / fs + a2)
// Each FA output must then settle to the constant 2*A*exp(j(a + d)), where
// 2 = (1/2 from mixing) x (4 from the 14- to 16-bit scaling) and d is a
// fixed offset set by the pipeline, measured on the first segment. Twelve
// segments with new random amplitudes and phases follow; in each, once the
// filters have settled, every output is compared with that prediction. This
// checks the cos/-sin mixing, the channel separation (the other FA is 4.8
// MHz away) and the filter gain. It also checks that bb_valid comes exactly
// every 2 clocks.
module dif_rx_tb;
  import dif_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 61.44, F1 = 16.16, F2 = 20.96;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] ftw1, ftw2;
  logic signed [13:0] adc_data = '0;
  logic signed [15:0] bb_i [2], bb_q [2];
  logic bb_valid;
  int checks = 0, failures = 0;

  dif_rx #(.PROFILE(PROF_HSDPA)) dut (
    .clk, .rst_n, .ftw1, .ftw2, .adc_data, .bb_i, .bb_q, .bb_valid
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

  real amp [2], ang [2], d [2];
  bit  have_d = 1'b0;
  longint m = 0;
  int last_v = -1, n_valid = 0;
  real maxerr = 0.0;

  // ADC source, one sample per clock
  always @(negedge clk) begin
    real v;
    v = amp[0] * $cos(2.0 * PI * F1 * real'(m) / FS + ang[0])
      + amp[1] * $cos(2.0 * PI * F2 * real'(m) / FS + ang[1]);
    adc_data <= 14'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    m++;
  end

  always @(posedge clk) if (rst_n && bb_valid) begin
    if (last_v >= 0) chk(int'(m) - last_v == 2, "bb_valid period");
    last_v = int'(m);
    n_valid++;
  end

  task automatic segment(int settle, int obs);
    for (int f = 0; f < 2; f++) begin
      amp[f] = real'($urandom_range(500, 3500));
      ang[f] = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    end
    repeat (settle) @(negedge clk);
    if (!have_d) begin
      for (int f = 0; f < 2; f++)
        d[f] = $atan2(real'(bb_q[f]), real'(bb_i[f])) - ang[f];
      have_d = 1'b1;
    end
    for (int n = 0; n < obs; n++) begin
      @(negedge clk);
      for (int f = 0; f < 2; f++) begin
        real ei, eq, e;
        ei = 2.0 * amp[f] * $cos(ang[f] + d[f]);
        eq = 2.0 * amp[f] * $sin(ang[f] + d[f]);
        e = $sqrt((ei - real'(bb_i[f])) ** 2 + (eq - real'(bb_q[f])) ** 2);
        if (e > maxerr) maxerr = e;
        chk(e < 120.0, $sformatf("FA%0d got %0d,%0d exp %0.1f,%0.1f",
                                 f + 1, bb_i[f], bb_q[f], ei, eq));
      end
    end
  endtask

  initial begin
    ftw1 = ftw_of(16160, 61440);
    ftw2 = ftw_of(20960, 61440);
    amp[0] = 0.0; amp[1] = 0.0; ang[0] = 0.0; ang[1] = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (13) segment(400, 200);
    chk(n_valid > 3000, "outputs produced");
    $display("max error %0.1f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
