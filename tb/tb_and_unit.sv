// tb_and_unit: self-checking testbench of and_unit (AND unit).
//
// Drives random 64-bit operands (plus all-zero and all-one patterns) on the
// falling clock edge and checks, one rising edge later, that the register
// holds the expected value, worked out bit by bit from the definition of
// AND. It also checks the one-cycle latency: the result must appear at
// the first rising edge after the operands change, not later.
module tb_and_unit;
  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, z, expect_z;
  int           checks = 0, failures = 0;

  and_unit #(.W(W)) dut (.clk(clk), .a(a), .b(b), .z(z));

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
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '0; end
        2: begin a = '0; b = '1; end
        3: begin a = '1; b = '1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      for (int k = 0; k < W; k++) expect_z[k] = a[k] && b[k];
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
