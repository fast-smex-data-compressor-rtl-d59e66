// compression_map_tb: exhaustive check of the three compression maps over
// every 16-bit word against the step-table reference model, including the
// illegal inputs (a one above the map's range), which must raise illegal
// and give 8'hFF.
module compression_map_tb;
  import compressor_pkg::*;
  import compress_ref_pkg::*;

  map_sel_e sel;
  logic [15:0] din;
  logic [7:0] code;
  logic illegal;
  int checks = 0, failures = 0;
  int exp_code;
  bit exp_ill;

  compression_map dut (.sel, .din, .code, .illegal);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      for (int x = 0; x < 65536; x++) begin
        sel = map_sel_e'(s);
        din = 16'(x);
        #1;
        case (sel)
          MAP_14_TO_8: begin exp_ill = x >= 16384; exp_code = exp_ill ? 255 : ref_code(14, x); end
          MAP_16_TO_8: begin exp_ill = 0;          exp_code = ref_code(16, x); end
          default:     begin exp_ill = x >= 32768; exp_code = exp_ill ? 255 : ref_code_bbf(x); end
        endcase
        checks++;
        if (code !== 8'(exp_code) || illegal !== exp_ill) begin
          failures++;
          if (failures < 20)
            $display("FAIL map %0d x=%0d code=%0d illegal=%b expected %0d %b",
                     s, x, code, illegal, exp_code, exp_ill);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
