// dcqm_tb: self-checking test of the complex quadrature modulator.
//
// Applies random I, Q, cos and sin words plus full-scale corner cases and
// checks, one cycle later, s_i = I cos - Q sin and s_q = I sin + Q cos after
// rounding by 2^15 and saturation to 16 bits.
module dcqm_tb;
  import rc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] i_in = '0, q_in = '0, cos_in = '0, sin_in = '0;
  logic signed [15:0] s_i, s_q;
  int checks = 0, failures = 0;

  dcqm dut (.clk, .rst_n, .i_in, .q_in, .cos_in, .sin_in, .s_i, .s_q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int i, int q, int c, int s);
    longint ei, eq;
    @(negedge clk);
    i_in = 16'(i); q_in = 16'(q); cos_in = 16'(c); sin_in = 16'(s);
    ei = clip(rshift_round(longint'(i) * c - longint'(q) * s, 15), 16);
    eq = clip(rshift_round(longint'(i) * s + longint'(q) * c, 15), 16);
    @(negedge clk);
    checks += 2;
    if (longint'(s_i) != ei || longint'(s_q) != eq) begin
      failures++;
      if (failures < 10)
        $display("FAIL i=%0d q=%0d c=%0d s=%0d: %0d,%0d exp %0d,%0d",
                 i, q, c, s, s_i, s_q, ei, eq);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    apply(1000, 0, 32767, 0);
    apply(0, 1000, 32767, 0);
    apply(1000, 0, 0, 32767);
    apply(0, 1000, 0, 32767);
    apply(32767, -32768, 23170, 23170);    // saturates
    apply(-32768, 32767, 23170, 23170);
    for (int n = 0; n < 5000; n++) begin
      real a;
      a = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
      apply($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
            $rtoi(32767.0 * $cos(a)), $rtoi(32767.0 * $sin(a)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
