// tb_clock_gating_logic15: self-checking testbench of the clock gating
// logic of the 15-operation ALU.
//
// For random select codes (each code many times) it checks, while clk is
// high, that exactly the expected gated clock is high (the select-to-unit
// table is written out here again, independently of the RTL), and while clk
// is low that all gated clocks are low. It also changes the select code in
// the middle of the high phase and checks that the gated clocks do not
// change before the next falling edge, i.e. that the gating is glitch-free.
module tb_clock_gating_logic15;
  localparam int NU = 11;

  logic            clk = 1'b0;
  logic [3:0]      sel;
  logic [NU-1:0]   gclk;
  int              checks = 0, failures = 0;
  int              pulses [NU];

  clock_gating_logic15 dut (.clk(clk), .sel(sel), .gclk(gclk));

  always #5 clk = ~clk;

  // Expected one-hot enable per select code.
  function automatic logic [NU-1:0] expected(int s);
    logic [NU-1:0] e = '0;
      if (s < 4)        e[s] = 1'b1;         // AND, XNOR, XOR, OR
      else if (s < 8)   e[4] = 1'b1;         // adder + 2's complement
      else if (s < 12)  e[s - 3] = 1'b1;     // ROR, ROL, SHR, SHL
      else if (s < 14)  e[9] = 1'b1;         // BCD adder/subtractor
      else if (s == 14) e[10] = 1'b1;        // BCD multiplier
      // 15: NOP, no clock
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
      sel = (i < 16) ? 4'(i) : 4'($urandom_range(15));
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
      sel = 4'($urandom_range(15));
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
