// nco: programmable numerically controlled oscillator giving the cosine and
// sine carriers for one FA.
//
// A PHASE_W-bit accumulator adds the tuning word ftw every clock, so the output
// frequency is f = ftw / 2^PHASE_W * 64 MHz. The top LUT_AW bits of the phase
// address a full-wave sine table; the cosine reads the same table a quarter turn
// ahead. The two table outputs are registered. The outputs therefore show the
// phase the accumulator held one clock earlier. cos_o/sin_o read 32767 and 0
// in the cycle after reset or clr.
// For the carriers this transceiver uses (12 and 20 MHz at 64 MHz), the tuning
// word is a multiple of 2^(PHASE_W-LUT_AW). Dropping the lower phase bits then
// introduces no error. The table contents follow dif_pkg::make_sin_lut.
module nco
  import dif_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic [PHASE_W-1:0] ftw,
  output amp_t               cos_o,
  output amp_t               sin_o
);

  logic [PHASE_W-1:0] phase_acc;
  logic [LUT_AW-1:0]  addr_s, addr_c;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) phase_acc <= '0;
    else               phase_acc <= phase_acc + ftw;
  end

  assign addr_s = phase_acc[PHASE_W-1 -: LUT_AW];
  assign addr_c = addr_s + LUT_AW'(2 ** (LUT_AW - 2));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      cos_o <= amp_t'(32767);
      sin_o <= '0;
    end else begin
      cos_o <= SIN_LUT[addr_c];
      sin_o <= SIN_LUT[addr_s];
    end
  end

endmodule
