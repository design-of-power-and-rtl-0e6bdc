// bcd_mult_unit: the BCD multiplier unit of the 15-operation ALU.
//
// Multiplies the two operands as N = W/4 digit packed BCD numbers with the
// parallel array multiplier (bcd_array_mult) and registers the low N digits
// (W bits) of the 2N-digit product at the rising edge of clk, this unit's
// gated clock: latency one clock edge. The high N digits are dropped: the
// ALU has a single W-bit result bus. Multiplying all 16 digits of each
// 64-bit operand follows the design description; keeping the low half is
// this implementation's choice, made to fit that single result bus.
module bcd_mult_unit #(
  parameter int unsigned W = alu_pkg::ALU_W   // operand width, a multiple of 4
) (
  input  logic         clk,   // (gated) clock of this unit
  input  logic [W-1:0] a,     // BCD multiplicand
  input  logic [W-1:0] b,     // BCD multiplier
  output logic [W-1:0] z      // registered low W bits of the BCD product
);
  localparam int unsigned N = W / 4;

  logic [2*W-1:0] prod;

  bcd_array_mult #(.N(N)) u_arr (.x(a), .y(b), .p(prod));

  always_ff @(posedge clk) z <= prod[W-1:0];
endmodule
