// cmrc_width_detect: register width detection at the end of the execution
// pipeline (write-back stage).
//
// For each byte position b = 1..3 it decides whether any thread of the warp
// needs byte b to hold its value. A thread does not need byte b when bits
// [31:8b-1] are all zeros (positive narrow value, found with a reduction OR)
// or all ones (negative narrow value, found with a reduction NAND), i.e. when
// bytes b..3 are only the sign extension of byte b-1. The warp mask is the OR
// of the per-thread "needed" bits, so it always describes a contiguous
// effective width; byte 0 is always stored and gets no mask bit.
//
// Including the sign bit of byte b-1 in the reduction is this design's choice:
// it makes the later sign extension exact, also for warps that mix positive
// and negative values. Purely combinational.
module cmrc_width_detect
  import cmrc_pkg::*;
(
  input  warp_data_t data,
  output wmask_t     wm     // wm[b-1] = byte b needed
);
  always_comb begin
    wm = '0;
    for (int t = 0; t < WARP_SIZE; t++) begin
      for (int b = 1; b < 4; b++) begin
        word_t low;   // bits below the sign bit of byte b-1
        logic  pos_narrow, neg_narrow;
        low        = 32'hFFFF_FFFF >> (33 - 8*b);
        pos_narrow = ~|(data[t] & ~low);   // reduction OR: bits [31:8b-1] all 0
        neg_narrow = ~(~&(data[t] | low)); // reduction NAND: bits [31:8b-1] all 1
        if (!(pos_narrow || neg_narrow)) wm[b-1] = 1'b1;
      end
    end
  end
endmodule
