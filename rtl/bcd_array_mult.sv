// bcd_array_mult: N x N digit parallel BCD multiplier.
//
// Every digit x_j of X is multiplied by every digit y_i of Y with a
// single-digit multiplier (bcd_digit_mult) and a binary-to-BCD converter
// (bin2bcd), all N*N products at once. Each product gives a low digit L_ij,
// weighted 10^(i+j), and a high digit H_ij, weighted 10^(i+j+1). For each
// row i the low digits form one 2N-digit BCD number and the high digits
// another; the 2N numbers are summed by a chain of 2N-digit BCD adders. The
// product has 2N digits and never overflows. Combinational.
//
// The digit products split into high and low nibbles and their sum by BCD
// adders follow the design description, which draws the 4 x 4 array and
// extends it to 16 x 16 digits. The order in which the partial products
// are summed (a plain row-by-row chain) is this implementation's own.
module bcd_array_mult #(
  parameter int unsigned N = 16   // digits per operand
) (
  input  logic [4*N-1:0] x,   // BCD multiplicand
  input  logic [4*N-1:0] y,   // BCD multiplier
  output logic [8*N-1:0] p    // BCD product, 2N digits
);
  localparam int unsigned PW = 8 * N;   // product width in bits

  // Partial-product rows: row 2i holds the low digits of x * y_i, row 2i+1
  // the high digits.
  logic [PW-1:0] row [2*N];
  // Running sums: acc[k] is the sum of rows 0..k-1.
  logic [PW-1:0] acc [2*N+1];

  for (genvar i = 0; i < N; i++) begin : g_row
    logic [4*N-1:0] lo, hi;
    for (genvar j = 0; j < N; j++) begin : g_col
      logic [6:0] pbin;
      bcd_digit_mult u_mul (.x(x[4*j +: 4]), .y(y[4*i +: 4]), .p(pbin));
      bin2bcd        u_cvt (.p(pbin), .b(hi[4*j +: 4]), .c(lo[4*j +: 4]));
    end
    assign row[2*i]   = PW'(lo) << (4 * i);
    assign row[2*i+1] = PW'(hi) << (4 * i + 4);
  end

  assign acc[0] = '0;
  for (genvar k = 0; k < 2*N; k++) begin : g_sum
    logic cout_unused;
    bcd_adder_n #(.N(2*N)) u_add (
      .a(acc[k]), .b(row[k]), .cin(1'b0), .s(acc[k+1]), .cout(cout_unused)
    );
  end

  assign p = acc[2*N];
endmodule
