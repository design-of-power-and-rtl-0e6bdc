// bcd_digit_mult: single-digit BCD multiplier with a binary product.
//
// Multiplies two BCD digits (0..9) and gives the product, 0..81, as a 7-bit
// binary number p. Combinational.
//
// A 4 x 4 bit multiplier has 16 partial products x_i*y_j. Because a BCD
// digit with bit 3 set is 8 or 9, its bits 2 and 1 are then 0, and several
// pairs of partial products of equal weight can never be 1 together:
//   weight 32: x3y2 / x2y3      weight 16: x3y1 / x1y3
//   weight  8: x2y1 / x0y3 and x1y2 / x3y0
// Each such pair is merged into one bit by an OR, which leaves twelve bits
// instead of sixteen to add: x3y3, (x3y2|x2y3), (x3y1|x1y3), x2y2,
// (x2y1|x0y3), (x1y2|x3y0), x0y2, x2y0, x1y1, x0y1, x1y0 and x0y0. The
// pairing is the one the design description's area-optimized multiplier
// draws; the final addition of the merged bits is written here as a plain
// sum, which synthesis maps to half and full adders as it sees fit.
// Inputs above 9 give wrong products.
module bcd_digit_mult (
  input  logic [3:0] x,   // BCD digit, 0..9
  input  logic [3:0] y,   // BCD digit, 0..9
  output logic [6:0] p    // binary product, 0..81
);
  logic w6, w5, w4a, w4b, w3a, w3b, w2a, w2b, w2c, w1a, w1b, w0;

  assign w6  = x[3] & y[3];
  assign w5  = (x[3] & y[2]) | (x[2] & y[3]);
  assign w4a = (x[3] & y[1]) | (x[1] & y[3]);
  assign w4b = x[2] & y[2];
  assign w3a = (x[2] & y[1]) | (x[0] & y[3]);
  assign w3b = (x[1] & y[2]) | (x[3] & y[0]);
  assign w2a = x[0] & y[2];
  assign w2b = x[2] & y[0];
  assign w2c = x[1] & y[1];
  assign w1a = x[0] & y[1];
  assign w1b = x[1] & y[0];
  assign w0  = x[0] & y[0];

  assign p = {w6, 6'b0}
           + {1'b0, w5, 5'b0}
           + {2'b0, w4a, 4'b0} + {2'b0, w4b, 4'b0}
           + {3'b0, w3a, 3'b0} + {3'b0, w3b, 3'b0}
           + {4'b0, w2a, 2'b0} + {4'b0, w2b, 2'b0} + {4'b0, w2c, 2'b0}
           + {5'b0, w1a, 1'b0} + {5'b0, w1b, 1'b0}
           + {6'b0, w0};
endmodule
