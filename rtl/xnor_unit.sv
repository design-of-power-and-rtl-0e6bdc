// xnor_unit: the logical XNOR unit of the ALU.
//
// A row of W two-input XNOR gates, one per bit of the operands, feeds a W-bit
// D flip-flop register: z takes the value of the bitwise XNOR of a and b at
// each rising edge of clk. In the ALU, clk is this unit's gated clock, so the
// register only changes in cycles in which XNOR is the selected operation.
// Latency: one clock edge. The gate array followed by a register is the
// structure the design description gives; the register has no reset, as
// none is described, so z is unknown until its first clock edge.
module xnor_unit #(
  parameter int unsigned W = alu_pkg::ALU_W   // operand width
) (
  input  logic         clk,   // (gated) clock of this unit
  input  logic [W-1:0] a,     // first operand
  input  logic [W-1:0] b,     // second operand
  output logic [W-1:0] z      // registered result
);
  always_ff @(posedge clk) z <= ~(a ^ b);
endmodule
