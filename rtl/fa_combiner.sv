// fa_combiner: digital combining of the two modulated FA signals.
//
// Adds the I signals of FA1 and FA2 into one I word and the Q signals into
// one Q word for the two-channel DAC, so that one DAC pair carries both
// frequency assignments. To keep the sum of two full-scale signals from
// clipping, the sum is halved with rounding (each FA then uses half of the
// DAC's range) and saturated to OW bits. Registered: one cycle of latency,
// one result per clock.
//
// The document gives the addition; the halving and widths are this design's
// choice.
module fa_combiner
  import dif_pkg::*;
#(
  parameter int DW = BB_W,
  parameter int OW = DAC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] fa1_i,
  input  logic signed [DW-1:0] fa1_q,
  input  logic signed [DW-1:0] fa2_i,
  input  logic signed [DW-1:0] fa2_q,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q
);
  localparam int SH = DW + 1 - OW;   // 1 when DW == OW
  logic signed [DW:0] sum_i, sum_q;

  always_comb begin
    sum_i = (DW+1)'(fa1_i) + (DW+1)'(fa2_i);
    sum_q = (DW+1)'(fa1_q) + (DW+1)'(fa2_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_i <= '0;
      out_q <= '0;
    end else begin
      out_i <= OW'(sat(round_shift(64'(sum_i), SH), OW));
      out_q <= OW'(sat(round_shift(64'(sum_q), SH), OW));
    end
  end
endmodule
