// bcd_addsub_unit: the BCD adder/subtractor unit of the 15-operation ALU.
//
// Both operands hold N = W/4 packed BCD digits, digit 0 in bits [3:0].
// For addition each digit of B goes straight to the BCD digit adder; for
// subtraction a multiplexer passes the 9's complement of each digit of B
// instead, and a carry of 1 enters digit 0, so that the adder forms
// A + (10^N - B), the 10's complement difference. The result is taken
// modulo 10^N: for A >= B it is A - B, for A < B it is 10^N - (B - A), the
// 10's complement of the difference, in the way a binary subtractor wraps.
// The sum is captured in a W-bit register at the rising edge of clk, this
// unit's gated clock: latency one clock edge. No decimal carry leaves the
// unit.
//
// The 9's complement unit, the ADD/SUB multiplexer and the binary adder with
// BCD correction follow the design description, which draws one digit. The
// ripple chain across digits and a carry-in of 1 for subtraction are this
// implementation's choices.
module bcd_addsub_unit #(
  parameter int unsigned W = alu_pkg::ALU_W   // operand width, a multiple of 4
) (
  input  logic         clk,   // (gated) clock of this unit
  input  logic         sub,   // 0: A + B, 1: A - B
  input  logic [W-1:0] a,     // BCD operand
  input  logic [W-1:0] b,     // BCD operand
  output logic [W-1:0] z      // registered BCD result
);
  localparam int unsigned N = W / 4;

  logic [W-1:0] b_nines, b_mux, sum;
  logic         cout_unused;

  for (genvar i = 0; i < N; i++) begin : g_nines
    nines_complement u_nc (.x(b[4*i +: 4]), .s(b_nines[4*i +: 4]));
  end

  assign b_mux = sub ? b_nines : b;

  bcd_adder_n #(.N(N)) u_add (
    .a(a), .b(b_mux), .cin(sub), .s(sum), .cout(cout_unused)
  );

  always_ff @(posedge clk) z <= sum;
endmodule
