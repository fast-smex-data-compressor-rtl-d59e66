// compressor_pkg: types and constants shared by the FAST/SMEX count-word
// compressor and the combinational compression map.
//
// The sequential compressor reduces a 14-, 15- or 16-bit particle count to an
// 8-bit quasi-logarithmic code. Its 5-bit state word Q4..Q0 is split in two:
// Q4Q3 tell how many mantissa bits follow the characteristic (11 = 6, 10 = 5,
// 01 = 4, 00 = 3) and Q2..Q0 are the characteristic itself. The mode names
// and the state-word layout follow the document; the enum encodings are this
// design's own choice.
package compressor_pkg;

  // Width of the widest count word the compressor accepts (16-bit mode).
  localparam int unsigned DATA_W  = 16;
  // Width of the compressed output word.
  localparam int unsigned CODE_W  = 8;

  // Input word width handled by the sequential compressor. The state machine
  // sees the mode as the two pins M14 and M16; 15-bit mode is neither.
  typedef enum logic [1:0] {
    MODE_14 = 2'd0,
    MODE_15 = 2'd1,
    MODE_16 = 2'd2
  } comp_mode_e;

  // Map used by the combinational compression map.
  typedef enum logic [1:0] {
    MAP_14_TO_8  = 2'd0,  // 14 -> 8: ESA burst, WPC, TEAMS
    MAP_16_TO_8  = 2'd1,  // 16 -> 8: ESA average, TEAMS
    MAP_12_TO_8  = 2'd2   // 12 -> 8: BBF
  } map_sel_e;

  // State word of the compressor state machine.
  typedef struct packed {
    logic [1:0] len;   // Q4Q3: mantissa length code
    logic [2:0] chr;   // Q2..Q0: characteristic
  } comp_state_t;

endpackage
