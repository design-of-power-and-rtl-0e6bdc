// bcd_digit_adder: one decimal digit of a BCD adder.
//
// A 4-bit binary adder adds the two digits and the carry-in; the BCD
// correction then adds 6 and sets the carry-out when the binary sum is
// above 9, so that the sum digit is again 0..9. Combinational. The binary
// adder followed by a correction stage follows the design description;
// the correction rule is the usual one for BCD addition.
module bcd_digit_adder (
  input  logic [3:0] a,     // BCD digit, 0..9
  input  logic [3:0] b,     // BCD digit, 0..9
  input  logic       cin,   // decimal carry in
  output logic [3:0] s,     // BCD sum digit
  output logic       cout   // decimal carry out
);
  logic [4:0] bin;

  assign bin  = {1'b0, a} + {1'b0, b} + {4'b0, cin};
  assign cout = (bin > 5'd9);
  assign s    = cout ? 4'(bin + 5'd6) : bin[3:0];
endmodule
