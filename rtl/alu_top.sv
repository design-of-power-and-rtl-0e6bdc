// alu_top: the two optimized ALUs side by side.
//
// Holds the 15-operation ALU (alu15_opt, the full design) and the
// 8-operation ALU (alu8_opt, its smaller variant with only the logic and
// binary arithmetic operations). They share the clock and nothing else:
// each has its own select code, operands and result. See those modules for
// the operations and the timing (one clock edge from operands to result).
module alu_top #(
  parameter int unsigned W = alu_pkg::ALU_W   // datapath width, a multiple of 4
) (
  input  logic         clk,      // clock of both ALUs
  // 15-operation ALU
  input  logic [3:0]   sel15,    // operation select, see alu_pkg::op15_e
  input  logic [W-1:0] a15,      // operand A
  input  logic [W-1:0] b15,      // operand B
  output logic [W-1:0] z15,      // result
  // 8-operation ALU
  input  logic [2:0]   sel8,     // operation select, 000..111
  input  logic [W-1:0] a8,       // operand A
  input  logic [W-1:0] b8,       // operand B
  output logic [W-1:0] z8        // result
);
  alu15_opt #(.W(W)) u_alu15 (.clk(clk), .sel(sel15), .a(a15), .b(b15), .z(z15));
  alu8_opt  #(.W(W)) u_alu8  (.clk(clk), .sel(sel8),  .a(a8),  .b(b8),  .z(z8));
endmodule
