// tb_bcd_array_mult: self-checking testbench of the parallel BCD array
// multiplier at its full 16 x 16 digit size and at the 4 x 4 digit size of
// the original drawing. Corner cases (zero, one, all nines) and random
// valid BCD operands; the 2N-digit products are checked against schoolbook
// decimal multiplication.
module tb_bcd_array_mult;
  import tb_bcd_ref_pkg::*;

  logic [63:0]  x16, y16;
  logic [127:0] p16;
  logic [15:0]  x4, y4;
  logic [31:0]  p4;
  int           checks = 0, failures = 0;

  bcd_array_mult            dut16 (.x(x16), .y(y16), .p(p16));
  bcd_array_mult #(.N(4))   dut4  (.x(x4),  .y(y4),  .p(p4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: begin x16 = '0; y16 = 64'h9999_9999_9999_9999; x4 = '0; y4 = 16'h9999; end
        1: begin x16 = 64'h1; y16 = 64'h9876_5432_1098_7654; x4 = 16'h1; y4 = 16'h4321; end
        2: begin x16 = 64'h9999_9999_9999_9999; y16 = 64'h9999_9999_9999_9999;
                 x4 = 16'h9999; y4 = 16'h9999; end
        default: begin
          x16 = 64'(rand_bcd(16)); y16 = 64'(rand_bcd(16));
          x4  = 16'(rand_bcd(4));  y4  = 16'(rand_bcd(4));
        end
      endcase
      #1;
      checks++;
      if (p16 !== 128'(mul_ref(bcd_t'(x16), bcd_t'(y16), 16))) begin
        failures++;
        $display("FAIL 16: %h * %h = %h", x16, y16, p16);
      end
      checks++;
      if (p4 !== 32'(mul_ref(bcd_t'(x4), bcd_t'(y4), 4))) begin
        failures++;
        $display("FAIL 4: %h * %h = %h", x4, y4, p4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
