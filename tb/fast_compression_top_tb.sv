// fast_compression_top_tb: end-to-end test of both compressors.
//
// Random and directed count words are sent through the sequential
// compressor in all three modes; every code is compared with the
// step-table reference model, with the latency it implies, and (in 14- and
// 16-bit mode) with the combinational map's code for the same word, which
// is driven in parallel. The map's 12-bit table and illegal inputs are
// exercised on the side. The testbench counts how often each mechanism of
// the design happened and counts a failure for any that never did:
// the preset and exit of the 6-bit range (branch A), the branch states B,
// C and D, reaching the linear range, a conversion that ends on its first
// cycle, a start ignored while busy, and an illegal map input.
module fast_compression_top_tb;
  import compressor_pkg::*;
  import compress_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic seq_start;
  comp_mode_e seq_mode;
  logic [15:0] seq_din;
  logic seq_busy, seq_done, seq_code_valid;
  logic [7:0] seq_code;
  comp_state_t seq_state;
  map_sel_e map_sel;
  logic [15:0] map_din;
  logic [7:0] map_code;
  logic map_illegal;

  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_c = 0, n_d = 0, n_linear = 0, n_first = 0;
  int n_ignored = 0, n_illegal = 0, n_bbf = 0;
  comp_state_t prev_state;

  fast_compression_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watch the state word for the branch transitions, sampled once per
  // cycle between clock edges.
  always @(negedge clk) begin
    prev_state <= seq_state;
    if (rst_n) begin
      if (prev_state.len == 2'b11 && seq_state.len == 2'b10) n_a++;
      if (prev_state == comp_state_t'(5'b10011) && seq_state == comp_state_t'(5'b01101)) n_b++;
      if (prev_state == comp_state_t'(5'b01010) && seq_state == comp_state_t'(5'b00011)) n_c++;
      if (prev_state == comp_state_t'(5'b10100) && seq_state == comp_state_t'(5'b01111)) n_d++;
    end
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic convert(comp_mode_e m, int x, bit poke);
    int width, xm, exp_code, edges;
    width = 14 + int'(m);
    xm = x & ((1 << width) - 1);
    exp_code = ref_code(width, xm);
    seq_mode = m; seq_din = 16'(x); seq_start = 1'b1;
    map_din = 16'(xm);
    map_sel = (m == MODE_14) ? MAP_14_TO_8 : MAP_16_TO_8;
    @(posedge clk); #1;
    seq_start = 1'b0;
    edges = 1;
    while (!seq_done && edges < 40) begin
      if (poke) begin
        seq_start = 1'b1;
        seq_din = 16'($urandom);
        n_ignored++;
      end
      @(posedge clk); #1;
      seq_start = 1'b0;
      edges++;
    end
    if (edges == 2) n_first++;
    if (seq_state == comp_state_t'(5'b00000)) n_linear++;
    check(seq_code == 8'(exp_code),
          $sformatf("mode %0d x=%0d code=%0d expected %0d", width, x, seq_code, exp_code));
    check(edges == ref_latency(width, xm),
          $sformatf("mode %0d x=%0d latency %0d", width, x, edges));
    if (m != MODE_15)
      check(map_code == seq_code,
            $sformatf("map and sequential differ at x=%0d: %0d %0d", xm, map_code, seq_code));
  endtask

  initial begin
    rst_n = 1'b0; seq_start = 1'b0; seq_mode = MODE_16; seq_din = '0;
    map_sel = MAP_16_TO_8; map_din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // directed: top bit set, small counts, each mode
    for (int m = 0; m < 3; m++) begin
      convert(comp_mode_e'(m), 1 << (13 + m), 1'b0);
      convert(comp_mode_e'(m), 0, 1'b0);
      convert(comp_mode_e'(m), 5, 1'b1);
      convert(comp_mode_e'(m), 100, 1'b0);
    end
    // random counts with a random number of significant bits
    for (int i = 0; i < 3000; i++)
      convert(comp_mode_e'(i % 3), int'($urandom) >> ($urandom % 32), (i % 50) == 7);
    // 12-bit map and illegal inputs
    for (int i = 0; i < 2000; i++) begin
      map_sel = map_sel_e'(i % 3);
      map_din = 16'($urandom >> ($urandom % 16));
      #1;
      if (map_illegal) n_illegal++;
      if (map_sel == MAP_12_TO_8) begin
        n_bbf++;
        check(map_illegal == map_din[15] &&
              map_code == (map_din[15] ? 8'hFF : 8'(ref_code_bbf(int'(map_din)))),
              $sformatf("12-bit map x=%0d code=%0d", map_din, map_code));
      end else if (map_sel == MAP_14_TO_8) begin
        check(map_illegal == (map_din[15:14] != 0) &&
              map_code == ((map_din[15:14] != 0) ? 8'hFF : 8'(ref_code(14, int'(map_din)))),
              $sformatf("14-bit map x=%0d code=%0d", map_din, map_code));
      end else begin
        check(!map_illegal && map_code == 8'(ref_code(16, int'(map_din))),
              $sformatf("16-bit map x=%0d code=%0d", map_din, map_code));
      end
    end
    $display("mechanisms: A=%0d B=%0d C=%0d D=%0d linear=%0d first_cycle=%0d ignored_start=%0d illegal=%0d bbf=%0d",
             n_a, n_b, n_c, n_d, n_linear, n_first, n_ignored, n_illegal, n_bbf);
    check(n_a > 0, "branch A never happened");
    check(n_b > 0, "branch B never happened");
    check(n_c > 0, "branch C never happened");
    check(n_d > 0, "branch D never happened");
    check(n_linear > 0, "linear range never reached");
    check(n_first > 0, "no conversion ended on its first cycle");
    check(n_ignored > 0, "no start while busy");
    check(n_illegal > 0, "no illegal map input");
    check(n_bbf > 0, "12-bit map never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
