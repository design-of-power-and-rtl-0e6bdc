// tb_nines_complement: exhaustive check of the one-digit 9's complement
// unit: for every BCD digit x (0..9) the output must be 9 - x.
module tb_nines_complement;
  logic [3:0] x, s;
  int         checks = 0, failures = 0;

  nines_complement dut (.x(x), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 10; v++) begin
      x = 4'(v);
      #1;
      checks++;
      if (int'(s) != 9 - v) begin
        failures++;
        $display("FAIL x=%0d s=%0d", v, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
