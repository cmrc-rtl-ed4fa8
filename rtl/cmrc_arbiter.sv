// cmrc_arbiter: coalescing arbiter for the register-file banks and the
// operand-collector write ports.
//
// Every cycle, for each bank in turn, it picks a primary request and then
// looks for a partner to coalesce with it into the same bank access:
//   * candidates are the two oldest queued writes of the bank, then the read
//     requests of all OC operands that target the bank, in a round-robin
//     order that rotates by one every cycle;
//   * the primary is the oldest write if there is one (writes first),
//     otherwise the first read whose OC slices are still free this cycle;
//   * the partner is the first later candidate whose entry has the other
//     parity (one even, right-aligned, one odd, left-aligned) and whose
//     physical sub-bank mask does not overlap the primary's.
// This covers two reads of the same or of different instructions, two writes,
// and a read with a write. A read also needs its slices of the destination OC
// write port: sub-bank s always travels over crossbar s into OC slice s, so
// reads from several banks may fill one OC in the same cycle as long as their
// sub-bank masks are disjoint (OC write coalescing). A request that finds no
// slot waits (port conflict) and is retried next cycle.
//
// Outputs per cycle: the two bank port commands of each bank, pops of the
// write queues, grants to the OC requests, the slice routes for the OC
// writes (to be applied one cycle later, when the bank read data appear),
// the writes performed, and event codes for performance counters. The
// selection order and write priority are this design's choices.
module cmrc_arbiter
  import cmrc_pkg::*;
#(
  parameter int unsigned N_BANKS = NUM_BANKS,
  parameter int unsigned N_OCS   = NUM_OCS,
  parameter int unsigned OPS     = OPS_PER_OC
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] wq_avail [N_BANKS],
  input  wq_entry_t  wq_head  [N_BANKS][2],
  input  rd_req_t    oc_req   [N_OCS][OPS],
  output bank_cmd_t  cmd_a    [N_BANKS],
  output bank_cmd_t  cmd_b    [N_BANKS],
  output logic [1:0] wq_pop   [N_BANKS],
  output logic       oc_grant [N_OCS][OPS],
  output xroute_t    route    [N_OCS][NUM_SUBBANKS],
  output wr_done_t   wr_done  [N_BANKS][2],
  output acc_kind_e  ev_bank  [N_BANKS],
  output logic       ev_oc_write [N_OCS],  // OC write port used
  output logic       ev_oc_xbank [N_OCS]   // OC written from two or more banks at once
);
  localparam int unsigned NR = N_OCS * OPS;  // read candidates
  localparam int unsigned NC = 2 + NR;       // all candidates of a bank

  logic [$clog2(NR)-1:0] rr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          rr_q <= '0;
    else if (rr_q == $clog2(NR)'(NR - 1)) rr_q <= '0;
    else                                 rr_q <= rr_q + 1'b1;
  end

  always_comb begin
    sbmask_t oc_used  [N_OCS];
    logic [N_BANKS-1:0] oc_banks [N_OCS];
    logic    c_ok   [NC];
    logic    c_wr   [NC];
    entry_t  c_ent  [NC];
    sbmask_t c_pm   [NC];
    oc_t     c_oc   [NC];
    opidx_t  c_op   [NC];
    int      p, q;

    for (int o = 0; o < N_OCS; o++) begin
      oc_used[o]  = '0;
      oc_banks[o] = '0;
      for (int i = 0; i < OPS; i++) oc_grant[o][i] = 1'b0;
      for (int s = 0; s < NUM_SUBBANKS; s++) route[o][s] = '0;
    end

    for (int b = 0; b < N_BANKS; b++) begin
      cmd_a[b]      = '0;
      cmd_b[b]      = '0;
      wq_pop[b]     = 2'd0;
      wr_done[b][0] = '0;
      wr_done[b][1] = '0;
      ev_bank[b]    = ACC_NONE;

      // build this bank's candidate list
      for (int k = 0; k < 2; k++) begin
        c_ok[k]  = (wq_avail[b] > 2'(k));
        c_wr[k]  = 1'b1;
        c_ent[k] = wq_head[b][k].entry;
        c_pm[k]  = phys_mask(wq_head[b][k].wm, wq_head[b][k].entry[0]);
        c_oc[k]  = '0;
        c_op[k]  = opidx_t'(k);
      end
      for (int j = 0; j < NR; j++) begin
        int idx, o, i;
        idx = (j + int'(rr_q)) % NR;
        o   = idx / OPS;
        i   = idx % OPS;
        c_wr[2+j]  = 1'b0;
        c_ent[2+j] = oc_req[o][i].entry;
        c_pm[2+j]  = phys_mask(oc_req[o][i].wm, oc_req[o][i].entry[0]);
        c_oc[2+j]  = oc_t'(o);
        c_op[2+j]  = opidx_t'(i);
        c_ok[2+j]  = oc_req[o][i].valid && (oc_req[o][i].bank == bank_t'(b))
                     && ((oc_used[o] & c_pm[2+j]) == '0);
      end

      // primary: oldest write, else first eligible read
      p = -1;
      if (c_ok[0]) p = 0;
      else begin
        for (int c = 2; c < NC; c++) if (p < 0 && c_ok[c]) p = c;
      end

      // partner: first later candidate, other parity, disjoint sub-banks
      q = -1;
      if (p >= 0) begin
        for (int c = 1; c < NC; c++) begin
          if (q < 0 && c > p && c_ok[c] && (c_ent[c][0] != c_ent[p][0])
              && ((c_pm[c] & c_pm[p]) == '0)) q = c;
        end
      end

      // issue the primary on port A and the partner on port B
      for (int n = 0; n < 2; n++) begin
        int c;
        bank_cmd_t cmd;
        c = (n == 0) ? p : q;
        cmd = '0;
        if (c >= 0) begin
          cmd.valid = 1'b1;
          cmd.we    = c_wr[c];
          cmd.entry = c_ent[c];
          cmd.sbm   = c_pm[c];
          if (c_wr[c]) begin
            cmd.wdata              = wq_head[b][c_op[c][0]].data;
            wq_pop[b]              = wq_pop[b] + 2'd1;
            wr_done[b][n].valid    = 1'b1;
            wr_done[b][n].warp     = wq_head[b][c_op[c][0]].warp;
            wr_done[b][n].rg       = wq_head[b][c_op[c][0]].rg;
          end else begin
            oc_grant[c_oc[c]][c_op[c]] = 1'b1;
            oc_used[c_oc[c]]           = oc_used[c_oc[c]] | c_pm[c];
            oc_banks[c_oc[c]][b]       = 1'b1;
            for (int s = 0; s < NUM_SUBBANKS; s++) begin
              if (c_pm[c][s]) begin
                route[c_oc[c]][s].valid = 1'b1;
                route[c_oc[c]][s].bank  = bank_t'(b);
                route[c_oc[c]][s].op    = c_op[c];
              end
            end
          end
        end
        if (n == 0) cmd_a[b] = cmd;
        else        cmd_b[b] = cmd;
      end

      // classify the access
      if (p >= 0 && q < 0)       ev_bank[b] = c_wr[p] ? ACC_WR : ACC_RD;
      else if (p >= 0) begin
        if (c_wr[p] && c_wr[q])        ev_bank[b] = ACC_WW;
        else if (c_wr[p] || c_wr[q])   ev_bank[b] = ACC_RW;
        else if (c_oc[p] == c_oc[q])   ev_bank[b] = ACC_RR_SAME;
        else                           ev_bank[b] = ACC_RR_DIFF;
      end
    end

    for (int o = 0; o < N_OCS; o++) begin
      ev_oc_write[o] = (oc_used[o] != '0);
      ev_oc_xbank[o] = ($countones(oc_banks[o]) > 1);
    end
  end
endmodule
