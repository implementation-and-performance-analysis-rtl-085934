// fa_combiner_tb: self-checking test of the two-FA combiner.
//
// Drives random and full-scale FA1/FA2 words and checks, one cycle later,
// out = round((fa1 + fa2) / 2) for I and Q independently.
module fa_combiner_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] fa1_i = '0, fa1_q = '0, fa2_i = '0, fa2_q = '0;
  logic signed [15:0] out_i, out_q;
  int checks = 0, failures = 0;

  fa_combiner dut (.clk, .rst_n, .fa1_i, .fa1_q, .fa2_i, .fa2_q, .out_i, .out_q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int half_round(int a, int b);
    int s;
    s = a + b;
    return (s + 1) >>> 1;
  endfunction

  task automatic apply(int a1, int b1, int a2, int b2);
    int ei, eq;
    @(negedge clk);
    fa1_i = 16'(a1); fa1_q = 16'(b1); fa2_i = 16'(a2); fa2_q = 16'(b2);
    ei = half_round(a1, a2);
    eq = half_round(b1, b2);
    if (ei > 32767) ei = 32767;
    if (eq > 32767) eq = 32767;
    @(negedge clk);
    checks += 2;
    if (int'(out_i) != ei || int'(out_q) != eq) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d+%0d -> %0d (exp %0d); %0d+%0d -> %0d (exp %0d)",
                 a1, a2, out_i, ei, b1, b2, out_q, eq);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    apply(32767, -32768, 32767, -32768);
    apply(1, 3, 0, -5);
    apply(100, 0, -100, 0);
    for (int n = 0; n < 5000; n++)
      apply($urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768,
            $urandom_range(0, 65535) - 32768, $urandom_range(0, 65535) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
