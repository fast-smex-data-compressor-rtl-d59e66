// data_compressor_tb: compresses every 16-bit word in each of the three
// modes and compares the code with the step-table reference model. It also
// checks the latency of each conversion (clock edges from the start edge
// to done) against the number of bit positions the compressor has to step
// through, that busy is high for the whole conversion, that a start while
// busy is ignored, and that done is a single-cycle pulse. In 14- and
// 15-bit mode the bits above the mode's width are expected to be ignored.
module data_compressor_tb;
  import compressor_pkg::*;
  import compress_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n, start;
  comp_mode_e mode;
  logic [15:0] din;
  logic busy, done, code_valid;
  logic [7:0] code;
  comp_state_t state;
  int checks = 0, failures = 0;

  data_compressor dut (.clk, .rst_n, .start, .mode, .din, .busy, .done,
                       .code, .code_valid, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic convert(comp_mode_e m, int x, bit poke_while_busy);
    int width, xm, exp_code, exp_lat, edges;
    width = 14 + int'(m);
    xm = x & ((1 << width) - 1);
    exp_code = ref_code(width, xm);
    exp_lat  = ref_latency(width, xm);
    mode = m; din = 16'(x); start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    edges = 1;
    // scramble the inputs: they must have been sampled on the start edge
    mode = comp_mode_e'($urandom % 3); din = 16'($urandom);
    while (!done && edges < 40) begin
      check(busy, $sformatf("busy during conversion of %0d", x));
      if (poke_while_busy) start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      edges++;
    end
    check(done && !busy, $sformatf("done for %0d", x));
    check(code == 8'(exp_code) && code_valid,
          $sformatf("mode %0d x=%0d code=%0d expected %0d", width, x, code, exp_code));
    check(edges == exp_lat,
          $sformatf("mode %0d x=%0d latency %0d expected %0d", width, x, edges, exp_lat));
    @(posedge clk); #1;
    check(!done, "done is one cycle");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; mode = MODE_16; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy && !done && !code_valid, "idle after reset");
    for (int m = 0; m < 3; m++)
      for (int x = 0; x < 65536; x++)
        convert(comp_mode_e'(m), x, (x % 97) == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
