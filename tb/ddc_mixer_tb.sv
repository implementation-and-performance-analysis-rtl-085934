// ddc_mixer_tb: self-checking test of the receive quadrature demodulator.
//
// Drives random 14-bit ADC samples and NCO words and checks, one cycle
// later, i = x cos and q = -x sin, scaled by 2^-13 (14-bit full scale to
// 16-bit full scale), rounded and saturated.
module ddc_mixer_tb;
  import rc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] x_in = '0;
  logic signed [15:0] cos_in = '0, sin_in = '0, i_out, q_out;
  int checks = 0, failures = 0;

  ddc_mixer dut (.clk, .rst_n, .x_in, .cos_in, .sin_in, .i_out, .q_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, int c, int s);
    longint ei, eq;
    @(negedge clk);
    x_in = 14'(x); cos_in = 16'(c); sin_in = 16'(s);
    ei = clip(rshift_round(longint'(x) * c, 13), 16);
    eq = clip(rshift_round(-longint'(x) * s, 13), 16);
    @(negedge clk);
    checks += 2;
    if (longint'(i_out) != ei || longint'(q_out) != eq) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%0d c=%0d s=%0d: %0d,%0d exp %0d,%0d",
                 x, c, s, i_out, q_out, ei, eq);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    apply(8191, 32767, 0);
    apply(-8192, -32768, -32768);    // saturates
    apply(4000, 0, 32767);
    for (int n = 0; n < 5000; n++)
      apply($urandom_range(0, 16383) - 8192, $urandom_range(0, 65535) - 32768,
            $urandom_range(0, 65535) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
