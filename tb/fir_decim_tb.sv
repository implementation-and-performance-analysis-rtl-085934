// fir_decim_tb: self-checking test of the decimation FIR.
//
// Uses the WiMAX 7 MHz design (/4, 129 taps, 64 MHz, 3.5 MHz cutoff,
// roll-off 0.115). Feeds an impulse, then random samples with in_valid high
// and later gapped, and compares every output with a reference convolution
// computed from independently designed taps. Checks that exactly one output
// comes per 4 inputs, one cycle after the 4th.
module fir_decim_tb;
  import rc_ref_pkg::*;

  localparam int M = 4, N = 129;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] in_data = '0, out_data;
  logic out_valid;
  int checks = 0, failures = 0;
  int taps[];
  longint hist[$];
  int n_in = 0, n_out = 0;
  longint exp_q[$];
  bit pending = 1'b0;

  fir_decim #(.M(M), .FS_KHZ(64000), .FC_KHZ(3500), .BETA_PPM(115000))
    dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

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

  always @(posedge clk) if (rst_n) begin
    // an output is due exactly one cycle after every M-th input
    chk(out_valid == pending, "out_valid timing");
    if (out_valid && exp_q.size() > 0) begin
      longint e;
      e = exp_q.pop_front();
      chk(longint'(out_data) == e, $sformatf("out %0d exp %0d", out_data, e));
      n_out++;
    end
    pending = 1'b0;
    if (in_valid) begin
      hist.push_front(longint'(in_data));
      n_in++;
      if (n_in % M == 0) begin
        longint acc;
        acc = 0;
        for (int k = 0; k < N && k < hist.size(); k++)
          acc += longint'(taps[k]) * hist[k];
        exp_q.push_back(clip(rshift_round(acc, 15 + $clog2(M)), 16));
        pending = 1'b1;
      end
    end
  end

  initial begin
    make_taps(taps, N, 64.0, 3.5, 0.115, real'(M));
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) begin in_valid = 1'b1; in_data = 16'sd32767; end
    @(negedge clk) in_data = '0;
    repeat (N + 4) @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk) in_data = 16'($urandom());
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_data  = 16'($urandom());
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
    chk(n_out == n_in / M, $sformatf("rate /4: %0d in %0d out", n_in, n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
