// input_shift_register: holds the count word being compressed and shifts it
// left one place per step, so that the bit position the state machine is
// examining is always at the top of the register.
//
// On load the word is aligned by mode so that the mode's most significant
// bit sits at the top (bit W-1): a 14-bit word is loaded shifted up by two,
// a 15-bit word by one, a 16-bit word as is. Bits above the mode's width are
// discarded. Each step shifts left by one with a zero entering at bit 0.
// The top bit tells the controller whether the leading one has arrived;
// the six bits under it are the longest mantissa a code can carry.
//
// The document shows this block only as a box feeding the bit shifter; the
// alignment on load, the zero fill and the port list are this design's own.
// Timing: load and shift act on the rising clock edge, load first.
module input_shift_register
  import compressor_pkg::*;
#(
  parameter int unsigned W = 16     // register width (widest mode)
) (
  input  logic             clk,
  input  logic             load,    // capture din, aligned by mode
  input  logic             shift,   // shift left one place
  input  comp_mode_e       mode,
  input  logic [W-1:0]     din,
  output logic             top,     // bit W-1
  output logic [5:0]       mant     // bits W-2 .. W-7
);

  logic [W-1:0] sr;
  logic [W-1:0] aligned;

  always_comb begin
    unique case (mode)
      MODE_14: aligned = din << 2;
      MODE_15: aligned = din << 1;
      default: aligned = din;
    endcase
  end

  always_ff @(posedge clk) begin
    if (load)       sr <= aligned;
    else if (shift) sr <= {sr[W-2:0], 1'b0};
  end

  assign top  = sr[W-1];
  assign mant = sr[W-2 -: 6];

endmodule
