// bcd_adder_n: N-digit BCD adder with ripple carry.
//
// N bcd_digit_adder stages, digit 0 in bits [3:0], each stage's decimal
// carry feeding the next. Combinational. Chaining digit adders is this
// implementation's way of widening the one-digit adder of the design
// description to a whole operand.
module bcd_adder_n #(
  parameter int unsigned N = 16   // number of BCD digits
) (
  input  logic [4*N-1:0] a,     // BCD operand
  input  logic [4*N-1:0] b,     // BCD operand
  input  logic           cin,   // carry into digit 0
  output logic [4*N-1:0] s,     // BCD sum
  output logic           cout   // carry out of digit N-1
);
  logic [N:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_digit
    bcd_digit_adder u_dig (
      .a(a[4*i +: 4]), .b(b[4*i +: 4]), .cin(c[i]),
      .s(s[4*i +: 4]), .cout(c[i+1])
    );
  end
  assign cout = c[N];
endmodule
