// output_register: the 8-bit register that holds the compressed code.
//
// It captures the bit shifter's output on the rising clock edge when load
// is high and holds it otherwise; valid rises with the first capture after
// reset and stays high, and a one-cycle strobe marks each new capture.
// The document names this register and its 8-bit width; the load enable,
// the reset and the valid/strobe outputs are this design's choices.
module output_register (
  input  logic       clk,
  input  logic       rst_n,   // asynchronous, active low
  input  logic       load,
  input  logic [7:0] d,
  output logic [7:0] q,
  output logic       valid,   // q holds a captured code
  output logic       strobe   // q was captured on the last edge
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= '0;
      valid  <= 1'b0;
      strobe <= 1'b0;
    end else begin
      strobe <= load;
      if (load) begin
        q     <= d;
        valid <= 1'b1;
      end
    end
  end

endmodule
