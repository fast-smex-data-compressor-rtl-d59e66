// fast_compression_top: the two count-word compressors side by side.
//
// u_seq is the sequential compressor of the FAST/SMEX instrument data path
// (shift register, 5-bit state machine, multiplexer bit shifter, output
// register): it turns a 14-, 15- or 16-bit count into an 8-bit
// quasi-logarithmic code in 3 to 15 clock cycles. u_map is the
// combinational compression map with its three tables (14->8, 16->8 and
// 12->8), giving its code in the same cycle. The 14- and 16-bit tables of
// the map and the 14- and 16-bit modes of the sequential compressor give the
// same codes. Each has its own ports; they share only the clock domain of
// the sequential part (the map has no clock). The count words come from the
// instrument's 14-bit counters and 16-bit averaging circuit, which are
// outside this design.
module fast_compression_top
  import compressor_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // sequential compressor
  input  logic               seq_start,
  input  comp_mode_e         seq_mode,
  input  logic [DATA_W-1:0]  seq_din,
  output logic               seq_busy,
  output logic               seq_done,
  output logic [CODE_W-1:0]  seq_code,
  output logic               seq_code_valid,
  output comp_state_t        seq_state,
  // combinational compression map
  input  map_sel_e           map_sel,
  input  logic [DATA_W-1:0]  map_din,
  output logic [CODE_W-1:0]  map_code,
  output logic               map_illegal
);

  data_compressor u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (seq_start),
    .mode       (seq_mode),
    .din        (seq_din),
    .busy       (seq_busy),
    .done       (seq_done),
    .code       (seq_code),
    .code_valid (seq_code_valid),
    .state      (seq_state)
  );

  compression_map u_map (
    .sel     (map_sel),
    .din     (map_din),
    .code    (map_code),
    .illegal (map_illegal)
  );

endmodule
