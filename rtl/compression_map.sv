// compression_map: combinational 16-bit to 8-bit compression by the position
// of the most significant non-zero bit (MSL, 0..15).
//
// Three maps are selectable:
//   MAP_14_TO_8  14-bit counts (ESA burst, WPC, TEAMS)
//   MAP_16_TO_8  16-bit counts (ESA average, TEAMS)
//   MAP_12_TO_8  12-bit counts held in bits 14..3 (BBF)
// For the 14- and 16-bit maps a word whose MSL is 3 or more becomes a
// characteristic C(MSL) followed by the n(MSL) bits just under the leading
// one; words below 8 pass through unchanged (linear range):
//   MSL     3  4  5  6  7  8  9 10 11 12 13 14 15
//   14->8 C 1  2  3  2  3  4  5  3  4  5  3  -  -
//         n 3  3  3  4  4  4  4  5  5  5  6  -  -
//   16->8 C 1  2  3  2  3  4  5  6  7  4  5  6  7
//         n 3  3  3  4  4  4  4  4  4  5  5  5  5
// The 12-bit map drops bits 2..0, passes bits 7..3 through while MSL <= 7,
// and otherwise gives a 3-bit characteristic MSL-7 followed by the five
// bits under the leading one.
// A word with a one above the map's range (bit 14 or 15 in the 14-bit map,
// bit 15 in the 12-bit map) is illegal: the map then raises illegal and
// saturates the code to 8'hFF. The tables are the document's; the
// saturation and the illegal flag are this design's choice.
// Purely combinational: a priority encoder followed by a shifter.
module compression_map
  import compressor_pkg::*;
(
  input  map_sel_e           sel,
  input  logic [DATA_W-1:0]  din,
  output logic [CODE_W-1:0]  code,
  output logic               illegal
);

  logic [3:0]  msl;
  logic        nonzero;
  logic [2:0]  chr;
  logic [2:0]  n;        // mantissa length
  logic [5:0]  body;     // din shifted so that the mantissa is in bits 5..0

  // Priority encoder: index of the most significant one.
  always_comb begin
    msl     = '0;
    nonzero = 1'b0;
    for (int i = 0; i < DATA_W; i++) begin
      if (din[i]) begin
        msl     = 4'(i);
        nonzero = 1'b1;
      end
    end
  end

  // Characteristic and mantissa length for the 14- and 16-bit maps.
  always_comb begin
    unique case (msl)
      4'd3:    begin chr = 3'd1; n = 3'd3; end
      4'd4:    begin chr = 3'd2; n = 3'd3; end
      4'd5:    begin chr = 3'd3; n = 3'd3; end
      4'd6:    begin chr = 3'd2; n = 3'd4; end
      4'd7:    begin chr = 3'd3; n = 3'd4; end
      4'd8:    begin chr = 3'd4; n = 3'd4; end
      4'd9:    begin chr = 3'd5; n = 3'd4; end
      4'd10:   if (sel == MAP_16_TO_8) begin chr = 3'd6; n = 3'd4; end
               else                    begin chr = 3'd3; n = 3'd5; end
      4'd11:   if (sel == MAP_16_TO_8) begin chr = 3'd7; n = 3'd4; end
               else                    begin chr = 3'd4; n = 3'd5; end
      4'd12:   begin chr = (sel == MAP_16_TO_8) ? 3'd4 : 3'd5; n = 3'd5; end
      4'd13:   if (sel == MAP_16_TO_8) begin chr = 3'd5; n = 3'd5; end
               else                    begin chr = 3'd3; n = 3'd6; end
      4'd14:   begin chr = 3'd6; n = 3'd5; end
      4'd15:   begin chr = 3'd7; n = 3'd5; end
      default: begin chr = 3'd0; n = 3'd3; end
    endcase
  end

  always_comb begin
    body    = '0;
    code    = '0;
    illegal = 1'b0;
    unique case (sel)
      MAP_12_TO_8: begin
        if (din[15]) begin
          illegal = 1'b1;
          code    = 8'hFF;
        end else if (!nonzero || msl <= 4'd7) begin
          code = {3'b000, din[7:3]};
        end else begin
          body = 6'(din >> (msl - 4'd5));
          code = {3'(msl - 4'd7), body[4:0]};
        end
      end
      default: begin
        if (sel == MAP_14_TO_8 && din[15:14] != 2'b00) begin
          illegal = 1'b1;
          code    = 8'hFF;
        end else if (!nonzero || msl < 4'd3) begin
          code = {5'b0, din[2:0]};
        end else begin
          // mantissa: the n bits under the leading one
          body = 6'(din >> (msl - 4'(n)));
          unique case (n)
            3'd3:    code = {2'b00, chr,         body[2:0]};
            3'd4:    code = {1'b0,  chr,         body[3:0]};
            3'd5:    code = {       chr,         body[4:0]};
            default: code = {       chr[1:0],    body[5:0]};
          endcase
        end
      end
    endcase
  end

endmodule
