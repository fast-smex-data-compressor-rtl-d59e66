// output_register_tb: checks reset, capture on load, hold without load,
// the valid flag and the one-cycle strobe against a testbench model.
module output_register_tb;
  logic clk = 1'b0;
  logic rst_n, load;
  logic [7:0] d, q;
  logic valid, strobe;
  logic [7:0] m_q;
  logic m_valid, m_strobe;
  int checks = 0, failures = 0;

  output_register dut (.clk, .rst_n, .load, .d, .q, .valid, .strobe);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== m_q || valid !== m_valid || strobe !== m_strobe) begin
      failures++;
      $display("FAIL %s: q=%h valid=%b strobe=%b expected %h %b %b",
               what, q, valid, strobe, m_q, m_valid, m_strobe);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; d = 8'h5A;
    #12;
    m_q = 8'h00; m_valid = 1'b0; m_strobe = 1'b0;
    check("in reset");
    @(posedge clk); #1;
    rst_n = 1'b1;
    @(posedge clk); #1;
    check("after reset");
    for (int i = 0; i < 1000; i++) begin
      load = ($urandom % 3) == 0;
      d = 8'($urandom);
      @(posedge clk); #1;
      m_strobe = load;
      if (load) begin
        m_q = d;
        m_valid = 1'b1;
      end
      check($sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
