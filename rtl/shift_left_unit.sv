// shift_left_unit: the one-place logical shift left unit of the ALU.
//
// No logic: only wiring from the input bits to a W-bit register of D
// flip-flops, where bit i of the result takes input bit i-1 and bit 0 is 0.
// The shift distance is one place, as the wiring
// drawn in the design description gives. z takes the result at each rising
// edge of clk, which in the ALU is this unit's gated clock. Latency: one
// clock edge. The unit works on the first operand (A) only; the description
// labels its input I0..I63 without naming the operand, so taking A is this
// implementation's choice. No reset is described and none is provided.
module shift_left_unit #(
  parameter int unsigned W = alu_pkg::ALU_W   // operand width, at least 2
) (
  input  logic         clk,   // (gated) clock of this unit
  input  logic [W-1:0] a,     // operand
  output logic [W-1:0] z      // registered result
);
  always_ff @(posedge clk) z <= {a[W-2:0], 1'b0};
endmodule
