// nco_tb: self-checking test of the NCO.
//
// Runs the oscillator with the document's HSDPA and WiMAX FA frequencies and
// a random tuning word, with a mid-run retune and pauses of `en`. A
// reference phase accumulator in the testbench predicts each output, and
// the expected cos/sin are computed with real arithmetic from the truncated
// phase (tolerance 1 LSB). Also checks the one-cycle latency after reset.
module nco_tb;
  import dif_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [31:0] ftw = '0;
  logic signed [15:0] cos_o, sin_o;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  nco dut (.clk, .rst_n, .en, .ftw, .cos_o, .sin_o);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_val(logic [31:0] ph, bit is_cos);
    real a, v;
    a = 2.0 * PI * real'(ph[31:22]) / 1024.0;
    v = 32767.0 * (is_cos ? $cos(a) : $sin(a));
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got > exp + 1 || got < exp - 1) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  logic [31:0] ph_model;

  task automatic run(logic [31:0] w, int n, bit pauses);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ftw = w;
      en  = pauses ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge clk);
      if (en) begin
        #1;
        check("cos", int'(cos_o), expect_val(ph_model, 1'b1));
        check("sin", int'(sin_o), expect_val(ph_model, 1'b0));
        ph_model += w;
      end
    end
  endtask

  initial begin
    ph_model = '0;
    repeat (3) @(posedge clk);
    #1;
    check("reset cos", int'(cos_o), 32767);
    check("reset sin", int'(sin_o), 0);
    @(negedge clk) rst_n = 1'b1;
    run(ftw_of(16160, 61440), 2000, 1'b0);
    run(ftw_of(20960, 61440), 2000, 1'b1);   // retune, phase continuous
    run(ftw_of(12000, 64000), 1000, 1'b0);
    run($urandom(), 3000, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
