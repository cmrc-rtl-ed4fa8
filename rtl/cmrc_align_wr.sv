// cmrc_align_wr: write-side byte-swap MUX and thread-interleaved formatting.
//
// The warp value (thread t, bytes B0..B3) is rearranged so that 32B slice s
// holds one byte position of all 32 threads: byte of thread t in slice s sits
// at bits [8t+7:8t]. Even entries keep the default right alignment (B0 in
// slice 0). Odd entries are left-aligned by swapping the bytes locally inside
// each thread (B0<->B3, B1<->B2), so their B0 slice lands in sub-bank 3. No
// data moves across threads, which keeps the MUX cost thread-local.
// The thread-interleaved format and the in-thread swap for odd entries follow
// the CMRC scheme; the bit position of each thread inside a slice is this
// design's choice. Purely combinational.
module cmrc_align_wr
  import cmrc_pkg::*;
(
  input  warp_data_t data,
  input  logic       odd,    // destination entry is odd: left-align
  output rf_line_t   line
);
  always_comb begin
    for (int s = 0; s < NUM_SUBBANKS; s++) begin
      for (int t = 0; t < WARP_SIZE; t++) begin
        line[s][8*t +: 8] = data[t][8*(odd ? (3 - s) : s) +: 8];
      end
    end
  end
endmodule
