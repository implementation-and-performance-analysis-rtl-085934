// nco: digitally programmable numerically controlled oscillator.
//
// A PHASE_W-bit phase accumulator advances by the tuning word `ftw` on every
// cycle with `en` high, so the output frequency is ftw / 2^PHASE_W times the
// clock rate. The top LUT_AW bits of the phase address a full-period sine ROM
// built at elaboration time; the cosine is read from the same ROM a quarter
// period ahead. `ftw` may be changed at any time and takes effect on the next
// step, which keeps the phase continuous.
//
// Timing: the phase register is updated on each enabled cycle and the ROM
// outputs are registered, so cos_o/sin_o belong to the phase held one cycle
// earlier. After reset the phase is 0, so the first outputs are cos = 32767,
// sin = 0. Outputs are Q1.15.
//
// The document gives only the NCO's role (a programmable oscillator per FA at
// 16.16/20.96 MHz for HSDPA and 12/20 MHz for WiMAX); the accumulator-plus-ROM
// structure and all widths are this design's choice.
module nco
  import dif_pkg::*;
#(
  parameter int PW = PHASE_W,
  parameter int AW = LUT_AW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [PW-1:0]          ftw,
  output logic signed [AMP_W-1:0] cos_o,
  output logic signed [AMP_W-1:0] sin_o
);
  localparam sin_rom_t ROM = sin_table();
  localparam int QUARTER = 2**(AW - 2);

  logic [PW-1:0] phase;
  logic [AW-1:0] addr_s, addr_c;

  assign addr_s = phase[PW-1 -: AW];
  assign addr_c = addr_s + AW'(QUARTER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      cos_o <= AMP_W'(32767);
      sin_o <= '0;
    end else if (en) begin
      phase <= phase + ftw;
      cos_o <= ROM[addr_c];
      sin_o <= ROM[addr_s];
    end
  end
endmodule
