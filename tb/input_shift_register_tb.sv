// input_shift_register_tb: loads random words in each mode and checks the
// alignment (the mode's top bit at the top), the six mantissa bits under
// it, the left shift with zero fill and the hold when neither load nor
// shift is asserted. The expected register contents are kept in a
// separate model word in the testbench.
module input_shift_register_tb;
  import compressor_pkg::*;

  logic clk = 1'b0;
  logic load, shift;
  comp_mode_e mode;
  logic [15:0] din;
  logic top;
  logic [5:0] mant;
  logic [15:0] model;
  int checks = 0, failures = 0;

  input_shift_register dut (.clk, .load, .shift, .mode, .din, .top, .mant);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (top !== model[15] || mant !== model[14:9]) begin
      failures++;
      $display("FAIL %s: top=%b mant=%b model=%b", what, top, mant, model);
    end
  endtask

  initial begin
    load = 1'b0; shift = 1'b0; mode = MODE_16; din = '0;
    @(posedge clk); #1;
    for (int t = 0; t < 300; t++) begin
      mode = comp_mode_e'(t % 3);
      din  = 16'($urandom);
      // mode's top bit index and where it must land
      model = din << (15 - (13 + t % 3));
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      check("after load");
      for (int s = 0; s < 17; s++) begin
        shift = ($urandom % 4) != 0;
        @(posedge clk); #1;
        if (shift) model = model << 1;
        check($sformatf("word %0d step %0d", t, s));
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
