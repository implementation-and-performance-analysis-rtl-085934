// fir_interp_tb: self-checking test of the interpolation FIR.
//
// Uses the HSDPA design (x4, 129 taps, 61.44 MHz, 2.8 MHz cutoff, roll-off
// 0.22). First an impulse, whose response must reproduce the raised-cosine
// taps computed here independently, then random samples, with `ce` held high
// and later toggled randomly. Every output is compared with a reference
// zero-stuffed convolution; in_take must come once every 4 enabled cycles.
module fir_interp_tb;
  import rc_ref_pkg::*;

  localparam int L = 4, N = 129;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic signed [15:0] in_data = '0, out_data;
  logic in_take, out_valid;
  int checks = 0, failures = 0;
  int taps[];
  longint hist[$];    // input samples, newest first
  int phase_m = 0, ce_count = 0, take_count = 0, outs = 0;
  longint exp_q[$];

  fir_interp #(.L(L), .FS_KHZ(61440), .FC_KHZ(2800), .BETA_PPM(220000))
    dut (.clk, .rst_n, .ce, .in_data, .in_take, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  // Reference: when ce is high, phase_m selects the taps; at phase 0 the
  // current in_data is pushed first.
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      chk(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) begin
        longint e;
        e = exp_q.pop_front();
        chk(longint'(out_data) == e,
            $sformatf("out %0d exp %0d (n=%0d)", out_data, e, outs));
      end
      outs++;
    end
    if (ce) begin
      longint acc;
      chk(in_take == (phase_m == 0), "in_take timing");
      if (phase_m == 0) begin
        hist.push_front(longint'(in_data));
        take_count++;
      end
      acc = 0;
      for (int k = 0; phase_m + k * L < N; k++)
        if (k < hist.size()) acc += longint'(taps[phase_m + k * L]) * hist[k];
      exp_q.push_back(clip(rshift_round(acc, 15), 16));
      phase_m = (phase_m + 1) % L;
      ce_count++;
    end else begin
      chk(!in_take, "in_take without ce");
    end
  end

  initial begin
    make_taps(taps, N, 61.44, 2.8, 0.22, real'(L));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // impulse: x = 16384 (0.5), outputs are taps/2
    @(negedge clk) begin ce = 1'b1; in_data = 16'sd16384; end
    while (!in_take) @(negedge clk);
    @(negedge clk) in_data = '0;
    repeat (N + 8) @(negedge clk);
    // random samples, continuous ce
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (in_take === 1'b0 && phase_m == 1) in_data = 16'($urandom());
    end
    // random samples, gapped ce
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ce = ($urandom_range(0, 2) != 0);
      if (phase_m == 1 || (i % 7) == 0) in_data = 16'($urandom_range(0, 65535) - 32768);
    end
    @(negedge clk) ce = 1'b0;
    repeat (3) @(negedge clk);
    chk(take_count * L >= ce_count && take_count * L < ce_count + L, "rate x4");
    chk(exp_q.size() == 0, "missing outputs");
    // the peak tap alone: impulse response first value check
    chk(taps[(N-1)/2] > 0, "tap design");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
