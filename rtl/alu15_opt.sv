// alu15_opt: area- and power-optimized 64-bit ALU with fifteen operations.
//
// Eleven functional units each compute one kind of operation from the
// operands A and B and hold their result in a register of their own: AND,
// XNOR, XOR, OR, the shared adder + 2's complement unit (ADD, SUB, INC,
// DEC), one-place rotate right and left, one-place shift right and left, the
// BCD adder/subtractor and the BCD multiplier. Two ideas cut area and power:
//  * hardware sharing: the four binary arithmetic operations use one adder
//    (addsub2c_unit) instead of four units;
//  * clock gating: clock_gating_logic15 passes the clock only to the unit
//    of the selected operation, so the registers (and, in a real device, the
//    clock tree) of the ten other units do not toggle.
// An output multiplexer, steered by the same select code, puts the selected
// unit's register on Z. Select code 1111 (NOP) clocks no unit and drives Z
// to zero.
//
// Timing: present sel, a and b before a rising edge of clk (sel stable while
// clk is low, as the gating latch samples it then); the selected unit
// captures its result at that edge and Z shows it from then on, as long as
// sel stays the same. Latency: one clock edge; a new operation can start
// every cycle. After sel changes, Z shows the newly selected unit's register
// until its next edge, that is the last result that unit computed.
//
// The units, the select codes, the one-gated-clock-per-unit structure and
// the output multiplexer follow the design description. All units see A and
// B directly (the description's input-side selector is taken to be plain
// wiring), the shift and rotate units use A, the BCD multiplier keeps the
// low 64 bits of its product, NOP gives zero, and no register has a reset:
// these are this implementation's choices.
module alu15_opt #(
  parameter int unsigned W = alu_pkg::ALU_W   // datapath width, a multiple of 4
) (
  input  logic         clk,   // clock
  input  logic [3:0]   sel,   // operation select, see alu_pkg::op15_e
  input  logic [W-1:0] a,     // operand A
  input  logic [W-1:0] b,     // operand B
  output logic [W-1:0] z      // result
);
  import alu_pkg::*;

  logic [NUM_UNITS15-1:0] gclk;
  logic [W-1:0] z_and, z_xnor, z_xor, z_or, z_arith;
  logic [W-1:0] z_ror, z_rol, z_shr, z_shl, z_bcd_as, z_bcd_mul;

  clock_gating_logic15 u_cg (.clk(clk), .sel(sel), .gclk(gclk));

  and_unit  #(.W(W)) u_and  (.clk(gclk[U_AND]),  .a(a), .b(b), .z(z_and));
  xnor_unit #(.W(W)) u_xnor (.clk(gclk[U_XNOR]), .a(a), .b(b), .z(z_xnor));
  xor_unit  #(.W(W)) u_xor  (.clk(gclk[U_XOR]),  .a(a), .b(b), .z(z_xor));
  or_unit   #(.W(W)) u_or   (.clk(gclk[U_OR]),   .a(a), .b(b), .z(z_or));

  addsub2c_unit #(.W(W)) u_arith (
    .clk(gclk[U_ARITH]), .op(arith_op_e'(sel[1:0])), .a(a), .b(b), .z(z_arith)
  );

  rotate_right_unit #(.W(W)) u_ror (.clk(gclk[U_ROR]), .a(a), .z(z_ror));
  rotate_left_unit  #(.W(W)) u_rol (.clk(gclk[U_ROL]), .a(a), .z(z_rol));
  shift_right_unit  #(.W(W)) u_shr (.clk(gclk[U_SHR]), .a(a), .z(z_shr));
  shift_left_unit   #(.W(W)) u_shl (.clk(gclk[U_SHL]), .a(a), .z(z_shl));

  bcd_addsub_unit #(.W(W)) u_bcd_as (
    .clk(gclk[U_BCD_AS]), .sub(sel[0]), .a(a), .b(b), .z(z_bcd_as)
  );
  bcd_mult_unit #(.W(W)) u_bcd_mul (
    .clk(gclk[U_BCD_MUL]), .a(a), .b(b), .z(z_bcd_mul)
  );

  // Output multiplexer.
  always_comb begin
    unique casez (sel)
      4'b0000: z = z_and;
      4'b0001: z = z_xnor;
      4'b0010: z = z_xor;
      4'b0011: z = z_or;
      4'b01??: z = z_arith;
      4'b1000: z = z_ror;
      4'b1001: z = z_rol;
      4'b1010: z = z_shr;
      4'b1011: z = z_shl;
      4'b110?: z = z_bcd_as;
      4'b1110: z = z_bcd_mul;
      default: z = '0;         // NOP
    endcase
  end
endmodule
