// bit_shift_tb: exhaustive check of the bit shifter over every state word
// and every mantissa input. The expected code is built arithmetically:
// with n = 3 + Q4Q3 mantissa bits, the characteristic Q2..Q0 (its top two
// bits when n = 6) is placed above the n highest mantissa bits.
module bit_shift_tb;
  import compressor_pkg::*;

  comp_state_t q;
  logic [5:0] mant;
  logic [7:0] code;
  int checks = 0, failures = 0;
  int n, exp_code, chr;

  bit_shift dut (.q, .mant, .code);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 32; s++) begin
      for (int m = 0; m < 64; m++) begin
        q = comp_state_t'(s);
        mant = 6'(m);
        #1;
        n = 3 + (s >> 3);
        chr = s & 7;
        if (n == 6) chr = chr >> 1;
        exp_code = (chr << n) | (m >> (6 - n));
        checks++;
        if (code !== 8'(exp_code)) begin
          failures++;
          $display("FAIL q=%b mant=%b code=%b expected %b", q, mant, code, 8'(exp_code));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
