// compressor_state_machine: the 5-bit state counter Q4..Q0 of the sequential
// compressor.
//
// The counter tracks which bit position of the input word is currently at
// the top of the input shift register. Q4Q3 give the number of mantissa bits
// the code for that position carries (11 = 6, 10 = 5, 01 = 4, 00 = 3) and
// Q2..Q0 are the characteristic bits placed ahead of the mantissa.
//
// Behaviour (from the document's state codes and branch rules):
//   * ld preset: 11110 in 14-bit mode (m14), otherwise 10111.
//   * step: Q2..Q0 count down as a binary counter. Q4Q3 count down only at
//     the branch states, where Q2..Q0 are set instead of decremented:
//       A  1111x                -> Q4Q3 - 1, Q2..Q0 - 1   (11110 -> 10101)
//       B  10011                -> 01101
//       C  01010                -> 00011
//       D  10100 with m16       -> 01111
//   * 00000 is the linear range; a step there holds the state.
// The 14-bit sequence is 11110 10101 10100 10011 01101 01100 01011 01010
// 00011 00010 00001 00000; the 15-bit one starts 10111 10110 and joins it at
// 10101; the 16-bit one is 10111 10110 10101 10100 01111 01110 01101 and then
// the same as the others.
//
// Interface: ld has priority over step; both act on the rising clock edge.
// The document's schematic has no reset pin and no step pin (it presets with
// LD and clocks every cycle); the step enable and holding at 00000 are this
// design's choices so that the counter can stop when the leading one is
// found. The state is defined after the first ld.
module compressor_state_machine
  import compressor_pkg::*;
(
  input  logic        clk,
  input  logic        ld,    // preset for the first cycle
  input  logic        step,  // advance one bit position
  input  logic        m14,   // 14-bit mode
  input  logic        m16,   // 16-bit mode
  output comp_state_t q      // Q4Q3 = q.len, Q2..Q0 = q.chr
);

  localparam comp_state_t PRESET_14 = '{len: 2'b11, chr: 3'b110};
  localparam comp_state_t PRESET_HI = '{len: 2'b10, chr: 3'b111};

  comp_state_t q_next;

  always_comb begin
    q_next = q;
    if (ld) begin
      q_next = m14 ? PRESET_14 : PRESET_HI;
    end else if (step) begin
      if (q.len == 2'b11) begin
        // A: leave the 6-bit range
        q_next = '{len: 2'b10, chr: q.chr - 3'd1};
      end else if (q == comp_state_t'(5'b10011)) begin
        // B: 5-bit range to 4-bit range
        q_next = comp_state_t'(5'b01101);
      end else if (q == comp_state_t'(5'b10100) && m16) begin
        // D: 16-bit mode leaves the 5-bit range one position earlier
        q_next = comp_state_t'(5'b01111);
      end else if (q == comp_state_t'(5'b01010)) begin
        // C: 4-bit range to 3-bit range
        q_next = comp_state_t'(5'b00011);
      end else if (q != comp_state_t'(5'b00000)) begin
        q_next = '{len: q.len, chr: q.chr - 3'd1};
      end
    end
  end

  always_ff @(posedge clk) begin
    q <= q_next;
  end

endmodule
