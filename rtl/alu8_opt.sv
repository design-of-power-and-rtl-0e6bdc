// alu8_opt: area- and power-optimized 64-bit ALU with eight operations.
//
// The eight operations are AND, XNOR, XOR, OR, ADD, SUB, INC and DEC,
// selected by a 3-bit code (000..111, the low three bits of the codes of
// alu_pkg::op15_e). Five functional units compute them, each holding its
// result in a register of its own: the four logic units and the shared
// adder + 2's complement unit that does all four arithmetic operations
// (hardware sharing). clock_gating_logic8 passes the clock only to the unit
// of the selected operation (clock gating), and an output multiplexer puts
// that unit's register on Z.
//
// Timing: present sel, a and b before a rising edge of clk (sel stable while
// clk is low); the selected unit captures its result at that edge and Z
// shows it from then on while sel stays the same. Latency: one clock edge;
// a new operation can start every cycle.
//
// The five units, the 3-bit select code, the select-to-clock table and the
// output multiplexer follow the design description. All units see A and B
// directly and no register has a reset: these are this implementation's
// choices.
module alu8_opt #(
  parameter int unsigned W = alu_pkg::ALU_W   // datapath width
) (
  input  logic         clk,   // clock
  input  logic [2:0]   sel,   // operation select
  input  logic [W-1:0] a,     // operand A
  input  logic [W-1:0] b,     // operand B
  output logic [W-1:0] z      // result
);
  import alu_pkg::*;

  logic [NUM_UNITS8-1:0] gclk;
  logic [W-1:0] z_and, z_xnor, z_xor, z_or, z_arith;

  clock_gating_logic8 u_cg (.clk(clk), .sel(sel), .gclk(gclk));

  and_unit  #(.W(W)) u_and  (.clk(gclk[3'(U_AND)]),  .a(a), .b(b), .z(z_and));
  xnor_unit #(.W(W)) u_xnor (.clk(gclk[3'(U_XNOR)]), .a(a), .b(b), .z(z_xnor));
  xor_unit  #(.W(W)) u_xor  (.clk(gclk[3'(U_XOR)]),  .a(a), .b(b), .z(z_xor));
  or_unit   #(.W(W)) u_or   (.clk(gclk[3'(U_OR)]),   .a(a), .b(b), .z(z_or));

  addsub2c_unit #(.W(W)) u_arith (
    .clk(gclk[3'(U_ARITH)]), .op(arith_op_e'(sel[1:0])), .a(a), .b(b), .z(z_arith)
  );

  // Output multiplexer.
  always_comb begin
    unique case (sel)
      3'b000:  z = z_and;
      3'b001:  z = z_xnor;
      3'b010:  z = z_xor;
      3'b011:  z = z_or;
      default: z = z_arith;   // 1xx
    endcase
  end
endmodule
