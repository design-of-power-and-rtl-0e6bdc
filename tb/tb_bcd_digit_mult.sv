// tb_bcd_digit_mult: exhaustive check of the single-digit BCD multiplier:
// for all 100 pairs of digits the binary product must equal x * y.
module tb_bcd_digit_mult;
  logic [3:0] x, y;
  logic [6:0] p;
  int         checks = 0, failures = 0;

  bcd_digit_mult dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) begin
        x = 4'(i);
        y = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d gave %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
