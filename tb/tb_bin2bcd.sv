// tb_bin2bcd: exhaustive check of the binary-to-BCD converter for every
// value 0..99: the tens digit b and the units digit c must satisfy
// 10*b + c = p with both digits 0..9.
module tb_bin2bcd;
  logic [6:0] p;
  logic [3:0] b, c;
  int         checks = 0, failures = 0;

  bin2bcd dut (.p(p), .b(b), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 100; v++) begin
      p = 7'(v);
      #1;
      checks++;
      if (b > 4'd9 || c > 4'd9 || 10 * int'(b) + int'(c) != v) begin
        failures++;
        $display("FAIL p=%0d b=%0d c=%0d", v, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
