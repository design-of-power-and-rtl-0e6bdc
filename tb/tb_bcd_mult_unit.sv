// tb_bcd_mult_unit: self-checking testbench of the registered 16-digit BCD
// multiplier unit. Operands change on the falling edge; one rising edge
// later the register must hold the low 16 digits of the decimal product.
module tb_bcd_mult_unit;
  import tb_bcd_ref_pkg::*;
  localparam int unsigned W = 64;
  localparam int          N = W / 4;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, z, expect_z;
  int           checks = 0, failures = 0;

  bcd_mult_unit #(.W(W)) dut (.clk(clk), .a(a), .b(b), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    b = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      case (i)
        0: begin a = 64'h12345678; b = 64'h87654321; end
        1: begin a = 64'h9999_9999_9999_9999; b = 64'h9999_9999_9999_9999; end
        default: begin a = W'(rand_bcd(N)); b = W'(rand_bcd(N)); end
      endcase
      expect_z = W'(mul_ref(bcd_t'(a), bcd_t'(b), N));
      @(posedge clk);
      #1;
      checks++;
      if (z !== expect_z) begin
        failures++;
        $display("FAIL a=%h b=%h z=%h expected %h", a, b, z, expect_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
