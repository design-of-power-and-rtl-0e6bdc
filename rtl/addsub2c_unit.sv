// addsub2c_unit: the shared "adder + 2's complement" unit, which performs
// ADD, SUB, INC and DEC with one main adder.
//
// Four operations that all reduce to "A plus something" share one adder
// (adder 2) instead of having a unit each:
//   ADD  A + B
//   SUB  A + (2's complement of B)
//   INC  A + 1
//   DEC  A + (2's complement of 1)
// The 2's complement block is a row of inverters followed by adder 1, which
// adds one. A 2-input multiplexer in front of it ("MUX 2") chooses what is
// complemented, B (0) or the constant 1 (1). A 3-input multiplexer ("MUX 1")
// chooses adder 2's second operand: B (0), the 2's complement (1) or the
// constant 1 (2). Adder 2 has carry-in 0. Its sum is captured in a W-bit
// register at the rising edge of clk, this unit's gated clock, so the
// latency is one clock edge. No carry or overflow flag leaves the unit.
//
// The two adders, the complement block and the two multiplexers and their
// select values follow the design description. Its select table prints the
// two multiplexer columns the other way round from the drawing; the
// columns are read here so that each operation gets the result its name
// says. The description sizes the adders at 8 bits; this unit uses the
// ALU's full width W (64) so that all four operations are W-bit wide.
module addsub2c_unit #(
  parameter int unsigned W = alu_pkg::ALU_W   // operand width
) (
  input  logic                clk,  // (gated) clock of this unit
  input  alu_pkg::arith_op_e  op,   // ADD, SUB, INC or DEC
  input  logic [W-1:0]        a,    // first operand
  input  logic [W-1:0]        b,    // second operand
  output logic [W-1:0]        z     // registered result
);
  import alu_pkg::*;

  localparam logic [W-1:0] ONE = W'(1);

  logic       mux2_sel;        // 0: B, 1: constant 1
  logic [1:0] mux1_sel;        // 0: B, 1: 2's complement, 2: constant 1
  logic [W-1:0] mux2_out, twos, mux1_out, sum;

  // Select values of the two multiplexers per operation.
  always_comb begin
    unique case (op)
      AR_ADD: begin mux1_sel = 2'd0; mux2_sel = 1'b0; end
      AR_SUB: begin mux1_sel = 2'd1; mux2_sel = 1'b0; end
      AR_INC: begin mux1_sel = 2'd2; mux2_sel = 1'b0; end
      AR_DEC: begin mux1_sel = 2'd1; mux2_sel = 1'b1; end
      default: begin mux1_sel = 2'd0; mux2_sel = 1'b0; end
    endcase
  end

  // 2's complement block: MUX 2, inverters, adder 1 (+1).
  assign mux2_out = mux2_sel ? ONE : b;
  assign twos     = ~mux2_out + ONE;

  // MUX 1 in front of the main adder.
  always_comb begin
    unique case (mux1_sel)
      2'd0:    mux1_out = b;
      2'd1:    mux1_out = twos;
      default: mux1_out = ONE;
    endcase
  end

  // Adder 2, carry-in 0.
  assign sum = a + mux1_out;

  always_ff @(posedge clk) z <= sum;
endmodule
