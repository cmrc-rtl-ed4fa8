// Self-checking test of cmrc_align_wr: every byte of the 32B slices is checked
// against the thread-interleaved layout, with and without the odd-entry swap.
module tb_cmrc_align_wr;
  import cmrc_pkg::*;
  warp_data_t data;
  logic       odd;
  rf_line_t   line;
  int checks = 0, failures = 0;

  cmrc_align_wr dut (.data(data), .odd(odd), .line(line));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int t = 0; t < WARP_SIZE; t++) data[t] = $urandom;
      odd = n[0];
      #1;
      for (int s = 0; s < 4; s++) begin
        for (int t = 0; t < WARP_SIZE; t++) begin
          logic [7:0] got, exp;
          got = line[s][8*t +: 8];
          // even: slice s holds byte s; odd: slice s holds byte 3-s
          exp = odd ? 8'(data[t] >> (8 * (3 - s))) : 8'(data[t] >> (8 * s));
          checks++;
          if (got !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL odd=%0d s=%0d t=%0d got %h exp %h", odd, s, t, got, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
