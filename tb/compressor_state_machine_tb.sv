// compressor_state_machine_tb: walks the state machine through its whole
// down-count in each of the three modes and compares every state with the
// state-code table of the compression scheme, then checks that 00000 holds,
// that a cycle without step holds, and that a preset overrides a step.
module compressor_state_machine_tb;
  import compressor_pkg::*;

  logic clk = 1'b0;
  logic ld, step, m14, m16;
  comp_state_t q;
  int checks = 0, failures = 0;

  compressor_state_machine dut (.clk, .ld, .step, .m14, .m16, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // State codes per bit position, top position first.
  logic [4:0] seq14 [12] = '{5'b11110, 5'b10101, 5'b10100, 5'b10011, 5'b01101,
                             5'b01100, 5'b01011, 5'b01010, 5'b00011, 5'b00010,
                             5'b00001, 5'b00000};
  logic [4:0] seq15 [13] = '{5'b10111, 5'b10110, 5'b10101, 5'b10100, 5'b10011,
                             5'b01101, 5'b01100, 5'b01011, 5'b01010, 5'b00011,
                             5'b00010, 5'b00001, 5'b00000};
  logic [4:0] seq16 [14] = '{5'b10111, 5'b10110, 5'b10101, 5'b10100, 5'b01111,
                             5'b01110, 5'b01101, 5'b01100, 5'b01011, 5'b01010,
                             5'b00011, 5'b00010, 5'b00001, 5'b00000};

  task automatic check(logic [4:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  task automatic run(logic a14, logic a16, logic [4:0] exp [], string name);
    m14 = a14; m16 = a16;
    ld = 1'b1; step = 1'b0;
    @(posedge clk); #1;
    ld = 1'b0; step = 1'b1;
    foreach (exp[i]) begin
      check(exp[i], $sformatf("%s position %0d", name, i));
      @(posedge clk); #1;
    end
    check(5'b00000, {name, " hold at 00000"});
    step = 1'b0;
  endtask

  initial begin
    ld = 1'b0; step = 1'b0; m14 = 1'b0; m16 = 1'b0;
    @(posedge clk); #1;
    run(1'b1, 1'b0, seq14, "M14");
    run(1'b0, 1'b0, seq15, "M15");
    run(1'b0, 1'b1, seq16, "M16");
    // no step: hold
    m14 = 1'b0; m16 = 1'b1; ld = 1'b1;
    @(posedge clk); #1;
    ld = 1'b0; step = 1'b1;
    repeat (3) @(posedge clk);
    #1 step = 1'b0;
    check(5'b10100, "after three steps");
    repeat (4) @(posedge clk);
    #1 check(5'b10100, "hold without step");
    // ld wins over step
    ld = 1'b1; step = 1'b1; m14 = 1'b1; m16 = 1'b0;
    @(posedge clk); #1;
    check(5'b11110, "ld over step");
    ld = 1'b0; step = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
