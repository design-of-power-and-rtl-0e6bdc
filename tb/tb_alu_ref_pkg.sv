// tb_alu_ref_pkg: reference model of the ALU operations for the
// testbenches, written independently of the RTL: binary operations with
// SystemVerilog operators on 64-bit values, BCD operations with the decimal
// digit arithmetic of tb_bcd_ref_pkg. The operation codes are those of the
// 15-operation ALU; the 8-operation ALU uses codes 0..7.
package tb_alu_ref_pkg;
  import tb_bcd_ref_pkg::*;

  localparam int W = 64;
  localparam int N = W / 4;

  // Expected result of operation op (0..15) on a and b.
  function automatic logic [W-1:0] alu_ref(int op, logic [W-1:0] a, logic [W-1:0] b);
    case (op)
      0:  return a & b;
      1:  return ~(a ^ b);
      2:  return a ^ b;
      3:  return a | b;
      4:  return a + b;
      5:  return a - b;
      6:  return a + 64'd1;
      7:  return a - 64'd1;
      8:  return (a >> 1) | (a << (W - 1));
      9:  return (a << 1) | (a >> (W - 1));
      10: return a >> 1;
      11: return a << 1;
      12: return W'(add_ref(bcd_t'(a), bcd_t'(b), N));
      13: return W'(sub_ref(bcd_t'(a), bcd_t'(b), N));
      14: return W'(mul_ref(bcd_t'(a), bcd_t'(b), N));
      default: return '0;   // NOP
    endcase
  endfunction

  // Operands for operation op: valid BCD for the BCD operations, otherwise
  // random binary with some corner cases.
  function automatic logic [W-1:0] rand_operand(int op);
    if (op >= 12 && op <= 14) return W'(rand_bcd(N));
    case ($urandom_range(15))
      0:       return '0;
      1:       return '1;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  // Which unit (gated clock number) performs operation op, -1 for NOP.
  function automatic int unit_of(int op);
    if (op < 4)   return op;
    if (op < 8)   return 4;
    if (op < 12)  return op - 3;
    if (op < 14)  return 9;
    if (op == 14) return 10;
    return -1;
  endfunction
endpackage
