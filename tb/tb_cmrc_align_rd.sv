// Self-checking test of cmrc_align_rd: narrow and full warp values are packed
// by the testbench into the slices their width and alignment use, the other
// slices are filled with junk, and the recovered 32-bit values must equal the
// originals (sign extension included).
module tb_cmrc_align_rd;
  import cmrc_pkg::*;
  rf_line_t   line;
  logic       odd;
  wmask_t     wm;
  warp_data_t data;
  int checks = 0, failures = 0;

  cmrc_align_rd dut (.line(line), .odd(odd), .wm(wm), .data(data));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    warp_data_t v;
    for (int n = 0; n < 400; n++) begin
      int nb;
      nb  = $urandom_range(1, 4);
      odd = n[0];
      wm  = (nb == 4) ? 3'b111 : (nb == 3) ? 3'b011 : (nb == 2) ? 3'b001 : 3'b000;
      for (int s = 0; s < 4; s++) for (int w = 0; w < SLICE_BITS / 32; w++) line[s][32*w +: 32] = $urandom;
      for (int t = 0; t < WARP_SIZE; t++) begin
        word_t r;
        r = $urandom;
        if (nb == 1) r = word_t'(signed'(r[7:0]));
        if (nb == 2) r = word_t'(signed'(r[15:0]));
        if (nb == 3) r = word_t'(signed'(r[23:0]));
        v[t] = r;
        for (int b = 0; b < nb; b++) line[odd ? 3 - b : b][8*t +: 8] = r[8*b +: 8];
      end
      #1;
      for (int t = 0; t < WARP_SIZE; t++) begin
        checks++;
        if (data[t] !== v[t]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d t=%0d got %h exp %h", n, t, data[t], v[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
