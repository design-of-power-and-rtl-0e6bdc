// clock_gating_logic8: clock gating logic of the 8-operation ALU.
//
// Splits the input clock into five gated clocks, one per functional unit,
// of which at most one runs in any cycle. The 3-bit select code is decoded
// into a one-hot enable: 000 AND, 001 XNOR, 010 XOR, 011 OR, and 1xx (add,
// subtract, increment, decrement) the shared adder + 2's complement unit.
// Each enable goes through a latch-based clock_gate cell, so the choice made
// while clk is low decides which unit receives the next rising edge. The
// select-to-clock table follows the design description; the decoder and
// gating cell are this implementation's own.
module clock_gating_logic8 (
  input  logic                              clk,   // free-running clock
  input  logic [2:0]                        sel,   // operation select
  output logic [alu_pkg::NUM_UNITS8-1:0]    gclk   // gated clocks, by alu_pkg::unit_e
);
  import alu_pkg::*;

  logic [NUM_UNITS8-1:0] en;

  always_comb begin
    en = '0;
    unique casez (sel)
      3'b000: en[3'(U_AND)]   = 1'b1;
      3'b001: en[3'(U_XNOR)]  = 1'b1;
      3'b010: en[3'(U_XOR)]   = 1'b1;
      3'b011: en[3'(U_OR)]    = 1'b1;
      default: en[3'(U_ARITH)] = 1'b1;   // 1xx: ADD, SUB, INC, DEC
    endcase
  end

  for (genvar u = 0; u < NUM_UNITS8; u++) begin : g_cg
    clock_gate u_cg (.clk(clk), .en(en[u]), .gclk(gclk[u]));
  end
endmodule
