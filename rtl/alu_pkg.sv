// alu_pkg: widths, operation codes and unit numbering shared by the
// clock-gated ALUs.
//
// The 15-operation ALU is selected by a 4-bit code (AND, XNOR, XOR, OR,
// ADD, SUB, INC, DEC, rotate right/left, shift right/left, BCD add, BCD
// subtract, BCD multiply, NOP). The 8-operation ALU uses the low three
// bits of the same codes. The codes and the datapath width of 64 bits follow
// the design description; the unit numbering (which gated clock drives
// which unit) is this implementation's own bookkeeping.
package alu_pkg;

  // Datapath width of both ALUs.
  localparam int unsigned ALU_W = 64;

  // Operation select codes of the 15-operation ALU.
  typedef enum logic [3:0] {
    OP_AND     = 4'b0000,
    OP_XNOR    = 4'b0001,
    OP_XOR     = 4'b0010,
    OP_OR      = 4'b0011,
    OP_ADD     = 4'b0100,
    OP_SUB     = 4'b0101,
    OP_INC     = 4'b0110,
    OP_DEC     = 4'b0111,
    OP_ROR     = 4'b1000,
    OP_ROL     = 4'b1001,
    OP_SHR     = 4'b1010,
    OP_SHL     = 4'b1011,
    OP_BCD_ADD = 4'b1100,
    OP_BCD_SUB = 4'b1101,
    OP_BCD_MUL = 4'b1110,
    OP_NOP     = 4'b1111
  } op15_e;

  // Operation of the shared adder + 2's complement unit: the low two bits of
  // the select code of ADD, SUB, INC and DEC.
  typedef enum logic [1:0] {
    AR_ADD = 2'b00,
    AR_SUB = 2'b01,
    AR_INC = 2'b10,
    AR_DEC = 2'b11
  } arith_op_e;

  // Functional units, one gated clock each. The 8-operation ALU has the
  // first five, the 15-operation ALU all eleven.
  typedef enum logic [3:0] {
    U_AND     = 4'd0,
    U_XNOR    = 4'd1,
    U_XOR     = 4'd2,
    U_OR      = 4'd3,
    U_ARITH   = 4'd4,
    U_ROR     = 4'd5,
    U_ROL     = 4'd6,
    U_SHR     = 4'd7,
    U_SHL     = 4'd8,
    U_BCD_AS  = 4'd9,
    U_BCD_MUL = 4'd10
  } unit_e;

  localparam int unsigned NUM_UNITS8  = 5;
  localparam int unsigned NUM_UNITS15 = 11;

endpackage
