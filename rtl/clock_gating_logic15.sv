// clock_gating_logic15: clock gating logic of the 15-operation ALU.
//
// Splits the input clock into eleven gated clocks, one per functional unit,
// of which at most one runs in any cycle. The 4-bit select code is decoded
// into a one-hot enable:
//   0000..0011  AND, XNOR, XOR, OR units
//   01xx        shared adder + 2's complement unit (ADD, SUB, INC, DEC)
//   1000..1011  rotate right, rotate left, shift right, shift left
//   110x        BCD adder/subtractor
//   1110        BCD multiplier
//   1111        (NOP) no unit
// Each enable goes through a latch-based clock_gate cell, so the choice made
// while clk is low decides which unit receives the next rising edge. The
// select-to-clock table follows the design description (it leaves 1111
// without a clock); the decoder and gating cell are this implementation's
// own.
module clock_gating_logic15 (
  input  logic                              clk,   // free-running clock
  input  logic [3:0]                        sel,   // operation select
  output logic [alu_pkg::NUM_UNITS15-1:0]   gclk   // gated clocks, by alu_pkg::unit_e
);
  import alu_pkg::*;

  logic [NUM_UNITS15-1:0] en;

  always_comb begin
    en = '0;
    unique casez (sel)
      4'b0000: en[U_AND]     = 1'b1;
      4'b0001: en[U_XNOR]    = 1'b1;
      4'b0010: en[U_XOR]     = 1'b1;
      4'b0011: en[U_OR]      = 1'b1;
      4'b01??: en[U_ARITH]   = 1'b1;
      4'b1000: en[U_ROR]     = 1'b1;
      4'b1001: en[U_ROL]     = 1'b1;
      4'b1010: en[U_SHR]     = 1'b1;
      4'b1011: en[U_SHL]     = 1'b1;
      4'b110?: en[U_BCD_AS]  = 1'b1;
      4'b1110: en[U_BCD_MUL] = 1'b1;
      default: en = '0;                 // 1111: NOP
    endcase
  end

  for (genvar u = 0; u < NUM_UNITS15; u++) begin : g_cg
    clock_gate u_cg (.clk(clk), .en(en[u]), .gclk(gclk[u]));
  end
endmodule
