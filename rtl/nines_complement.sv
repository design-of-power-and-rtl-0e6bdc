// nines_complement: 9's complement of one BCD digit, 9 - x.
//
// Each of the four bits is XORed with 1 (that is, inverted) and a 4-bit
// binary adder then adds the constant 1010, keeping four bits:
// (15 - x) + 10 = 25 - x, which is 9 - x modulo 16. Combinational.
//
// The XOR row followed by a 4-bit adder follows the design description.
// Its text names the added constant 0110, which does not give 9 - x; the
// constant here is 1010, the value that does (0110 with its bits in the
// reverse order).
module nines_complement (
  input  logic [3:0] x,   // BCD digit, 0..9
  output logic [3:0] s    // 9 - x
);
  logic [3:0] inv;

  assign inv = x ^ 4'b1111;
  assign s   = inv + 4'b1010;
endmodule
