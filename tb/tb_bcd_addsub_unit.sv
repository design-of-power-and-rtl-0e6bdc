// tb_bcd_addsub_unit: self-checking testbench of the 16-digit BCD
// adder/subtractor. Drives corner cases (carries through all digits, equal
// operands, A < B) and random valid BCD operands, adding and subtracting,
// on the falling edge, and checks the register one rising edge later
// against digit-by-digit decimal arithmetic modulo 10^16.
module tb_bcd_addsub_unit;
  import tb_bcd_ref_pkg::*;
  localparam int unsigned W = 64;
  localparam int          N = W / 4;

  logic         clk = 1'b0;
  logic         sub;
  logic [W-1:0] a, b, z, expect_z;
  int           checks = 0, failures = 0;

  bcd_addsub_unit #(.W(W)) dut (.clk(clk), .sub(sub), .a(a), .b(b), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sub = 1'b0;
    a   = '0;
    b   = '0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      sub = i[0];
      case (i / 2)
        0: begin a = 64'h9999_9999_9999_9999; b = 64'h1;  end
        1: begin a = 64'h1234_5678_9012_3456; b = 64'h1234_5678_9012_3456; end
        2: begin a = 64'h5;                   b = 64'h17; end
        3: begin a = 64'h0;                   b = 64'h9999_9999_9999_9999; end
        default: begin a = W'(rand_bcd(N)); b = W'(rand_bcd(N)); end
      endcase
      expect_z = sub ? W'(sub_ref(bcd_t'(a), bcd_t'(b), N))
                     : W'(add_ref(bcd_t'(a), bcd_t'(b), N));
      @(posedge clk);
      #1;
      checks++;
      if (z !== expect_z) begin
        failures++;
        $display("FAIL sub=%0b a=%h b=%h z=%h expected %h", sub, a, b, z, expect_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
