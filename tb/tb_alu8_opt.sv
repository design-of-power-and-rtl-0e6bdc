// tb_alu8_opt: self-checking testbench of the optimized 8-operation ALU.
//
// Runs every operation code several times and then a random sequence, with
// operands and select code changed on the falling edge. One rising edge
// later Z must equal the reference model's result (one-cycle latency), and
// every unit other than the selected one must have kept its register value
// (the effect of clock gating), which is checked through the units' result
// registers.
module tb_alu8_opt;
  import tb_alu_ref_pkg::*;
  localparam int NU = 5;

  logic         clk = 1'b0;
  logic [2:0]   sel;
  logic [W-1:0] a, b, z, expect_z;
  logic [W-1:0] unit_z [NU];
  logic [W-1:0] prev_z [NU];
  int           checks = 0, failures = 0;

  alu8_opt dut (.clk(clk), .sel(sel), .a(a), .b(b), .z(z));

  assign unit_z = '{dut.u_and.z, dut.u_xnor.z, dut.u_xor.z, dut.u_or.z, dut.u_arith.z};

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op, u;
    sel = '0;
    a   = '0;
    b   = '0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      op  = (i < 4 * 8) ? i % 8 : int'($urandom_range(7));
      sel = 3'(op);
      a   = rand_operand(op);
      b   = rand_operand(op);
      expect_z = alu_ref(op, a, b);
      prev_z   = unit_z;
      @(posedge clk);
      #1;
      checks++;
      if (z !== expect_z) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h z=%h expected %h", op, a, b, z, expect_z);
      end
      u = unit_of(op);
      for (int k = 0; k < NU; k++) begin
        if (k == u) continue;
        checks++;
        if (unit_z[k] !== prev_z[k]) begin
          failures++;
          $display("FAIL op=%0d: unit %0d changed although not selected", op, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
