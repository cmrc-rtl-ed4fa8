// cmrc_align_rd: read-side byte-swap MUX and narrow-width recovery.
//
// Inverse of cmrc_align_wr: it gathers byte b of thread t from slice b (even
// entry) or slice 3-b (odd entry, swapped back). Bytes above the stored
// effective width are not read from the line (their sub-banks were never
// written or hold another register's data) and are filled with the sign bit
// of the highest stored byte, recovering the full 32-bit value.
// The swap-back and the sign extension follow the CMRC scheme; placing this
// logic after the dispatch selection is this design's choice.
// Purely combinational.
module cmrc_align_rd
  import cmrc_pkg::*;
(
  input  rf_line_t   line,
  input  logic       odd,    // source entry is odd: bytes were swapped
  input  wmask_t     wm,     // bytes 1..3 stored
  output warp_data_t data
);
  always_comb begin
    int top;  // highest stored byte
    top = wm[2] ? 3 : (wm[1] ? 2 : (wm[0] ? 1 : 0));
    for (int t = 0; t < WARP_SIZE; t++) begin
      logic sign;
      sign = line[odd ? (3 - top) : top][8*t + 7];
      for (int b = 0; b < 4; b++) begin
        if (b <= top) data[t][8*b +: 8] = line[odd ? (3 - b) : b][8*t +: 8];
        else          data[t][8*b +: 8] = {8{sign}};
      end
    end
  end
endmodule
