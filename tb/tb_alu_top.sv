// tb_alu_top: end-to-end testbench of both optimized ALUs at their default
// 64-bit size.
//
// Each cycle both ALUs get an operation and operands on the falling clock
// edge: first every operation code in turn, then random ones. One rising
// edge later each result is compared with the reference model. The test
// watches the gated clocks inside each ALU and counts how the design's
// mechanisms were exercised; a mechanism that never happened counts as a
// failure:
//   - every operation code of each ALU, including NOP;
//   - hardware sharing: ADD, SUB, INC and DEC all through the one shared
//     adder unit (its gated clock pulsing for each of them);
//   - clock gating: in every cycle exactly the selected unit's clock pulses
//     (none for NOP), and each unit is held off at least once while its
//     operands changed and keeps its register value.
module tb_alu_top;
  import tb_alu_ref_pkg::*;

  logic         clk = 1'b0;
  logic [3:0]   sel15;
  logic [2:0]   sel8;
  logic [W-1:0] a15, b15, z15, a8, b8, z8, e15, e8;
  int           checks = 0, failures = 0;

  // Mechanism counters.
  int op15_seen [16];
  int op8_seen  [8];
  int shared15_seen [4];   // ADD, SUB, INC, DEC through the shared adder
  int shared8_seen  [4];
  int held15 [11];         // cycles a unit's clock was off and it kept its value
  int held8  [5];
  int pulses15 [11];
  int pulses8  [5];

  alu_top dut (
    .clk(clk),
    .sel15(sel15), .a15(a15), .b15(b15), .z15(z15),
    .sel8(sel8),   .a8(a8),   .b8(b8),   .z8(z8)
  );

  logic [10:0] gclk15;
  logic [4:0]  gclk8;
  assign gclk15 = dut.u_alu15.gclk;
  assign gclk8  = dut.u_alu8.gclk;

  // Unit result registers, to see that gated-off units keep their values.
  logic [W-1:0] r15 [11];
  logic [W-1:0] r8  [5];
  assign r15 = '{dut.u_alu15.u_and.z, dut.u_alu15.u_xnor.z, dut.u_alu15.u_xor.z,
                 dut.u_alu15.u_or.z, dut.u_alu15.u_arith.z, dut.u_alu15.u_ror.z,
                 dut.u_alu15.u_rol.z, dut.u_alu15.u_shr.z, dut.u_alu15.u_shl.z,
                 dut.u_alu15.u_bcd_as.z, dut.u_alu15.u_bcd_mul.z};
  assign r8  = '{dut.u_alu8.u_and.z, dut.u_alu8.u_xnor.z, dut.u_alu8.u_xor.z,
                 dut.u_alu8.u_or.z, dut.u_alu8.u_arith.z};

  for (genvar u = 0; u < 11; u++) begin : g_p15
    always @(posedge gclk15[u]) pulses15[u]++;
  end
  for (genvar u = 0; u < 5; u++) begin : g_p8
    always @(posedge gclk8[u]) pulses8[u]++;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counts as a space-separated decimal list.
  function automatic string list(int v []);
    string r = "";
    foreach (v[k]) r = {r, $sformatf(" %0d", v[k])};
    return r;
  endfunction

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    int op15, op8, u15, u8;
    int p15 [11];
    int p8  [5];
    logic [W-1:0] old15 [11];
    logic [W-1:0] old8  [5];
    logic [W-1:0] pa15, pb15, pa8, pb8;

    for (int k = 0; k < 11; k++) begin pulses15[k] = 0; held15[k] = 0; end
    for (int k = 0; k < 5; k++)  begin pulses8[k] = 0;  held8[k] = 0;  end
    for (int k = 0; k < 16; k++) op15_seen[k] = 0;
    for (int k = 0; k < 8; k++)  op8_seen[k] = 0;
    for (int k = 0; k < 4; k++)  begin shared15_seen[k] = 0; shared8_seen[k] = 0; end
    sel15 = '0; sel8 = '0;
    a15 = '0; b15 = '0; a8 = '0; b8 = '0;

    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pa15 = a15; pb15 = b15; pa8 = a8; pb8 = b8;
      op15 = (i < 32) ? i % 16 : int'($urandom_range(15));
      op8  = (i < 32) ? i % 8  : int'($urandom_range(7));
      sel15 = 4'(op15);
      sel8  = 3'(op8);
      a15 = rand_operand(op15); b15 = rand_operand(op15);
      a8  = rand_operand(op8);  b8  = rand_operand(op8);
      e15 = alu_ref(op15, a15, b15);
      e8  = alu_ref(op8, a8, b8);
      p15 = pulses15; p8 = pulses8;
      old15 = r15; old8 = r8;
      @(posedge clk);
      #1;
      expect_eq($sformatf("15-op ALU op %0d", op15), z15, e15);
      expect_eq($sformatf("8-op ALU op %0d", op8), z8, e8);
      if (z15 === e15) op15_seen[op15]++;
      if (z8 === e8)   op8_seen[op8]++;

      // Clock gating: exactly the selected unit's clock pulsed.
      u15 = unit_of(op15);
      u8  = unit_of(op8);
      for (int k = 0; k < 11; k++) begin
        checks++;
        if (pulses15[k] - p15[k] != ((k == u15) ? 1 : 0)) begin
          failures++;
          $display("FAIL 15-op ALU op %0d: unit %0d clock pulsed %0d times",
                   op15, k, pulses15[k] - p15[k]);
        end else if (k != u15 && r15[k] === old15[k] &&
                     (a15 !== pa15 || b15 !== pb15)) begin
          held15[k]++;
        end
      end
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (pulses8[k] - p8[k] != ((k == u8) ? 1 : 0)) begin
          failures++;
          $display("FAIL 8-op ALU op %0d: unit %0d clock pulsed %0d times",
                   op8, k, pulses8[k] - p8[k]);
        end else if (k != u8 && r8[k] === old8[k] && (a8 !== pa8 || b8 !== pb8)) begin
          held8[k]++;
        end
      end
      // Hardware sharing: arithmetic through the shared adder unit.
      if (op15 >= 4 && op15 < 8 && pulses15[4] != p15[4] && z15 === e15)
        shared15_seen[op15 - 4]++;
      if (op8 >= 4 && pulses8[4] != p8[4] && z8 === e8)
        shared8_seen[op8 - 4]++;
    end

    // Every mechanism must have happened.
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (op15_seen[k] == 0) begin failures++; $display("FAIL 15-op code %0d never ran correctly", k); end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (op8_seen[k] == 0) begin failures++; $display("FAIL 8-op code %0d never ran correctly", k); end
    end
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (shared15_seen[k] == 0) begin failures++; $display("FAIL 15-op shared adder op %0d never seen", k); end
      if (shared8_seen[k] == 0)  begin failures++; $display("FAIL 8-op shared adder op %0d never seen", k); end
    end
    for (int k = 0; k < 11; k++) begin
      checks++;
      if (held15[k] == 0) begin failures++; $display("FAIL 15-op unit %0d never gated off", k); end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (held8[k] == 0) begin failures++; $display("FAIL 8-op unit %0d never gated off", k); end
    end
    $display("15-op ALU, operations per code 0..15:%s", list(op15_seen));
    $display("8-op ALU, operations per code 0..7:%s", list(op8_seen));
    $display("shared adder uses (ADD SUB INC DEC): 15-op%s, 8-op%s",
             list(shared15_seen), list(shared8_seen));
    $display("cycles gated off with changing operands, per unit: 15-op%s, 8-op%s",
             list(held15), list(held8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
