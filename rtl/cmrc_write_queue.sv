// cmrc_write_queue: per-bank queue of register writes waiting for a bank
// access slot.
//
// Holds up to DEPTH writes in arrival order. Up to NPUSH writes enter per
// cycle (one per write-back port; port 0 is older). The two oldest entries are
// shown to the arbiter, which may retire the oldest, or the two oldest
// together when they were coalesced into one bank access. Pushes and pops may
// happen in the same cycle; pushes may not exceed the free count. The queue
// as a whole is this design's choice: it lets writes of different
// instructions wait side by side so that two of them can be coalesced.
module cmrc_write_queue
  import cmrc_pkg::*;
#(
  parameter int unsigned DEPTH = WQ_DEPTH,
  parameter int unsigned NPUSH = 2
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push      [NPUSH],
  input  wq_entry_t push_data [NPUSH],
  input  logic [1:0] pop,       // 0, 1 or 2 oldest entries retired
  output logic [$clog2(DEPTH+1)-1:0] free_cnt,
  output logic [1:0] avail,     // number of valid entries shown, 0..2
  output wq_entry_t head [2]
);
  wq_entry_t q [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign free_cnt = $bits(cnt)'(DEPTH) - cnt;
  assign avail   = (cnt >= 2) ? 2'd2 : 2'(cnt);
  assign head[0] = q[0];
  assign head[1] = q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (i + int'(pop) < DEPTH) q[i] <= q[i + int'(pop)];
      end
      begin
        int wp;
        wp = int'(cnt) - int'(pop);
        for (int k = 0; k < NPUSH; k++) begin
          if (push[k]) begin
            q[wp] <= push_data[k];
            wp++;
          end
        end
        cnt <= $bits(cnt)'(wp);
      end
    end
  end

  logic [$clog2(NPUSH+1)-1:0] n_push;
  always_comb begin
    n_push = '0;
    for (int k = 0; k < NPUSH; k++) n_push += $bits(n_push)'(push[k]);
  end
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) int'(n_push) <= int'(free_cnt));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop <= avail);
endmodule
