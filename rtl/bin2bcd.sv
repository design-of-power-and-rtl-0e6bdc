// bin2bcd: binary-to-BCD converter for a one-digit product.
//
// Turns a binary number p of 0..99 (in use, a digit product of at most 81)
// into two BCD digits: b, the tens (the product's high nibble), and c, the
// units (its low nibble). Combinational. The description draws a gate
// network whose units digit passes p0 straight through; only the function
// is taken here, computed as a division by the constant 10.
module bin2bcd (
  input  logic [6:0] p,   // binary value, 0..99
  output logic [3:0] b,   // tens digit
  output logic [3:0] c    // units digit
);
  logic [6:0] tens;

  assign tens = p / 7'd10;
  assign b    = tens[3:0];
  assign c    = 4'(p - 7'(tens * 7'd10));
endmodule
