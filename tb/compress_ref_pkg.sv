// compress_ref_pkg: reference models used by the testbenches.
//
// The compressed code is computed here from the step tables of the
// compression scheme rather than from bit patterns: counts 0..15 map to
// themselves, and each higher octave [start, 2*start) is cut into a number
// of equal steps of a given size. The code is the number of steps below the
// count, summed over all lower octaves. Steps (number x size) per octave:
//   octave   14-bit     15-bit     16-bit
//   16       8 x 2      8 x 2      8 x 2
//   32       8 x 4      8 x 4      8 x 4
//   64      16 x 4     16 x 4     16 x 4
//   128     16 x 8     16 x 8     16 x 8
//   256     16 x 16    16 x 16    16 x 16
//   512     16 x 32    16 x 32    16 x 32
//   1K      32 x 32    32 x 32    16 x 64
//   2K      32 x 64    32 x 64    16 x 128
//   4K      32 x 128   32 x 128   32 x 128
//   8K      64 x 128   32 x 256   32 x 256
//   16K        -       32 x 512   32 x 512
//   32K        -          -       32 x 1024
// The 12-bit (BBF) map uses bits 14..3 of the word: values below 64 are
// kept, and octave 2^k (k = 6..11) of that 12-bit value holds 32 steps of
// size 2^(k-5).
package compress_ref_pkg;

  function automatic int steps_of(int width, int oct);  // oct = log2(start)
    case (oct)
      4, 5:    return 8;
      6, 7, 8, 9: return 16;
      10, 11:  return (width == 16) ? 16 : 32;
      13:      return (width == 14) ? 64 : 32;
      default: return 32;
    endcase
  endfunction

  // Code of count x in the 14-, 15- or 16-bit map (x already within width).
  function automatic int ref_code(int width, int x);
    int base;
    int start;
    int steps;
    if (x < 16) return x;
    base = 16;
    for (int oct = 4; oct < width; oct++) begin
      start = 1 << oct;
      steps = steps_of(width, oct);
      if (x < 2 * start) return base + (x - start) / (start / steps);
      base += steps;
    end
    return -1;
  endfunction

  // Code of the 12-bit BBF map for a 16-bit word with bit 15 clear.
  function automatic int ref_code_bbf(int x);
    int v;
    v = (x >> 3) & 32'hFFF;
    if (v < 64) return v;
    for (int k = 6; k < 12; k++)
      if (v < (2 << k)) return 32 * (k - 4) + (v - (1 << k)) / (1 << (k - 5));
    return -1;
  endfunction

  // Index of the most significant one, -1 for zero.
  function automatic int msb_index(int x);
    int r;
    r = -1;
    for (int i = 0; i < 32; i++) if (((x >> i) & 1) != 0) r = i;
    return r;
  endfunction

  // Clock edges from the start edge to the edge after which done is high:
  // one step per bit position from the top down to the leading one, or
  // down to the linear range and one more for small counts, plus the
  // load and capture edges.
  function automatic int ref_latency(int width, int x);
    int l;
    l = msb_index(x);
    if (l >= 3) return (width - 1 - l) + 2;
    return (width - 3) + 2;
  endfunction

endpackage
