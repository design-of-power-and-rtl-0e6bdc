// tb_addsub2c_unit: self-checking testbench of the shared adder + 2's
// complement unit. For each of ADD, SUB, INC and DEC it drives corner-case
// and random 64-bit operands on the falling edge and checks the register one
// rising edge later against 64-bit arithmetic done in the testbench
// (wrap-around modulo 2^64).
module tb_addsub2c_unit;
  import alu_pkg::*;
  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  arith_op_e    op;
  logic [W-1:0] a, b, z, expect_z;
  int           checks = 0, failures = 0;

  addsub2c_unit #(.W(W)) dut (.clk(clk), .op(op), .a(a), .b(b), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = AR_ADD;
    a  = '0;
    b  = '0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      op = arith_op_e'(i % 4);
      case (i / 4)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = 64'd1; end
        2: begin a = 64'd5; b = 64'd7; end
        3: begin a = 64'h8000_0000_0000_0000; b = '1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      case (op)
        AR_ADD: expect_z = a + b;
        AR_SUB: expect_z = a - b;
        AR_INC: expect_z = a + 64'd1;
        AR_DEC: expect_z = a - 64'd1;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (z !== expect_z) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h z=%h expected %h", op.name(), a, b, z, expect_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
