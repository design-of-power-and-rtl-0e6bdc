// tb_clock_gating_logic8: self-checking testbench of the clock gating
// logic of the 8-operation ALU.
//
// For random select codes (each code many times) it checks, while clk is
// high, that exactly the expected gated clock is high (the select-to-unit
// table is written out here again, independently of the RTL), and while clk
// is low that all gated clocks are low. It also changes the select code in
// the middle of the high phase and checks that the gated clocks do not
// change before the next falling edge, i.e. that the gating is glitch-free.
module tb_clock_gating_logic8;
  localparam int NU = 5;

  logic            clk = 1'b0;
  logic [2:0]      sel;
  logic [NU-1:0]   gclk;
  int              checks = 0, failures = 0;
  int              pulses [NU];

  clock_gating_logic8 dut (.clk(clk), .sel(sel), .gclk(gclk));

  always #5 clk = ~clk;

  // Expected one-hot enable per select code.
  function automatic logic [NU-1:0] expected(int s);
    logic [NU-1:0] e = '0;
      if (s >= 4) e[4] = 1'b1;          // 1xx: adder + 2's complement
      else        e[s] = 1'b1;          // 000..011: AND, XNOR, XOR, OR
    return e;
  endfunction

  for (genvar u = 0; u < NU; u++) begin : g_count
    always @(posedge gclk[u]) pulses[u]++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NU-1:0] held;
    for (int u = 0; u < NU; u++) pulses[u] = 0;
    sel = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel = (i < 8) ? 3'(i) : 3'($urandom_range(7));
      #1;
      checks++;
      if (gclk !== '0) begin
        failures++;
        $display("FAIL gated clock high while clk low: %b", gclk);
      end
      @(posedge clk);
      #1;
      checks++;
      held = expected(int'(sel));
      if (gclk !== held) begin
        failures++;
        $display("FAIL sel=%0d gclk=%b expected %b", sel, gclk, held);
      end
      // Change the select code inside the high phase.
      sel = 3'($urandom_range(7));
      #2;
      checks++;
      if (gclk !== held) begin
        failures++;
        $display("FAIL gated clocks changed within the high phase: %b, was %b", gclk, held);
      end
    end
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (pulses[u] == 0) begin
        failures++;
        $display("FAIL gated clock %0d never pulsed", u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
