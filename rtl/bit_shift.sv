// bit_shift: forms the 8-bit compressed code from the state word and the
// mantissa bits under the top of the input shift register.
//
// It is eight 4:1 multiplexers, one per output bit, all selected by the
// state's Q4Q3 (the mantissa length). The characteristic Q2..Q0 goes ahead
// of the mantissa and any bits above it are zero:
//   Q4Q3 = 11: Q2 Q1 m5 m4 m3 m2 m1 m0        (6 mantissa bits; Q0 unused)
//   Q4Q3 = 10: Q2 Q1 Q0 m5 m4 m3 m2 m1        (5 mantissa bits)
//   Q4Q3 = 01: 0  Q2 Q1 Q0 m5 m4 m3 m2        (4 mantissa bits)
//   Q4Q3 = 00: 0  0  Q2 Q1 Q0 m5 m4 m3        (3 mantissa bits)
// where m5 is the bit just under the leading one. The multiplexer structure
// and its select, characteristic and data buses follow the document's block
// diagram; the bit layout follows its state-code table. Purely combinational.
module bit_shift
  import compressor_pkg::*;
(
  input  comp_state_t  q,      // state word: q.len selects, q.chr is placed
  input  logic [5:0]   mant,   // mantissa candidates, mant[5] highest
  output logic [7:0]   code
);

  // One 4:1 multiplexer per output bit; input k is taken when Q4Q3 = k.
  logic [3:0] mux_in [8];

  always_comb begin
    // inputs for Q4Q3 = 00
    mux_in[7][0] = 1'b0;       mux_in[6][0] = 1'b0;
    mux_in[5][0] = q.chr[2];   mux_in[4][0] = q.chr[1];
    mux_in[3][0] = q.chr[0];   mux_in[2][0] = mant[5];
    mux_in[1][0] = mant[4];    mux_in[0][0] = mant[3];
    // inputs for Q4Q3 = 01
    mux_in[7][1] = 1'b0;       mux_in[6][1] = q.chr[2];
    mux_in[5][1] = q.chr[1];   mux_in[4][1] = q.chr[0];
    mux_in[3][1] = mant[5];    mux_in[2][1] = mant[4];
    mux_in[1][1] = mant[3];    mux_in[0][1] = mant[2];
    // inputs for Q4Q3 = 10
    mux_in[7][2] = q.chr[2];   mux_in[6][2] = q.chr[1];
    mux_in[5][2] = q.chr[0];   mux_in[4][2] = mant[5];
    mux_in[3][2] = mant[4];    mux_in[2][2] = mant[3];
    mux_in[1][2] = mant[2];    mux_in[0][2] = mant[1];
    // inputs for Q4Q3 = 11
    mux_in[7][3] = q.chr[2];   mux_in[6][3] = q.chr[1];
    mux_in[5][3] = mant[5];    mux_in[4][3] = mant[4];
    mux_in[3][3] = mant[3];    mux_in[2][3] = mant[2];
    mux_in[1][3] = mant[1];    mux_in[0][3] = mant[0];
  end

  always_comb begin
    for (int b = 0; b < 8; b++) begin
      code[b] = mux_in[b][q.len];
    end
  end

endmodule
