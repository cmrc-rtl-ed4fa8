// Self-checking test of cmrc_arbiter with directed cases for every kind of
// coalescing (write/write, read/write, two reads of one instruction, two reads
// of different instructions, reads from two banks into one OC) and for the
// cases that must not coalesce (same entry parity, overlapping sub-banks,
// overlapping OC slices), plus write priority and round-robin fairness, then
// random request sets checked against the rules every cycle must obey.
module tb_cmrc_arbiter;
  import cmrc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] wq_avail [4];
  wq_entry_t  wq_head  [4][2];
  rd_req_t    oc_req   [4][3];
  bank_cmd_t  cmd_a [4], cmd_b [4];
  logic [1:0] wq_pop [4];
  logic       oc_grant [4][3];
  xroute_t    route [4][4];
  wr_done_t   wr_done [4][2];
  acc_kind_e  ev_bank [4];
  logic       ev_oc_write [4], ev_oc_xbank [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmrc_arbiter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clear();
    for (int b = 0; b < 4; b++) begin
      wq_avail[b] = 0; wq_head[b][0] = '0; wq_head[b][1] = '0;
    end
    for (int o = 0; o < 4; o++) for (int i = 0; i < 3; i++) oc_req[o][i] = '0;
  endtask

  function automatic wq_entry_t wr(int e, wmask_t wm, int w);
    wq_entry_t x;
    x = '0; x.entry = entry_t'(e); x.wm = wm; x.warp = warp_t'(w); x.rg = reg_t'(w + 1);
    for (int s = 0; s < 4; s++) x.data[s] = {8{32'(w * 16 + s)}};
    return x;
  endfunction

  function automatic rd_req_t rd(int b, int e, wmask_t wm);
    return '{valid: 1'b1, bank: bank_t'(b), entry: entry_t'(e), wm: wm};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. two narrow writes, even + odd, disjoint -> one access
    clear();
    wq_avail[0] = 2; wq_head[0][0] = wr(4, 3'b001, 3); wq_head[0][1] = wr(7, 3'b000, 5);
    #1;
    check(ev_bank[0] == ACC_WW && wq_pop[0] == 2, "write-write coalesced");
    check(cmd_a[0].valid && cmd_a[0].we && cmd_a[0].sbm == 4'b0011 && cmd_a[0].entry == 4, "port A write");
    check(cmd_b[0].valid && cmd_b[0].we && cmd_b[0].sbm == 4'b1000 && cmd_b[0].entry == 7, "port B write");
    check(cmd_b[0].wdata[3] == wq_head[0][1].data[3], "port B data");
    check(wr_done[0][0].valid && wr_done[0][0].warp == 3 && wr_done[0][1].valid && wr_done[0][1].warp == 5, "write done");

    // 2. two writes of the same parity -> serialized
    clear();
    wq_avail[0] = 2; wq_head[0][0] = wr(4, 3'b000, 1); wq_head[0][1] = wr(6, 3'b000, 2);
    #1;
    check(ev_bank[0] == ACC_WR && wq_pop[0] == 1 && !cmd_b[0].valid, "same parity not coalesced");

    // 3. write + read in one bank
    clear();
    wq_avail[1] = 1; wq_head[1][0] = wr(2, 3'b000, 9);
    oc_req[0][0] = rd(1, 5, 3'b011);   // odd, 3 bytes -> 1110
    #1;
    check(ev_bank[1] == ACC_RW && oc_grant[0][0] && wq_pop[1] == 1, "read-write coalesced");
    check(route[0][1].valid && route[0][2].valid && route[0][3].valid && !route[0][0].valid
          && route[0][3].bank == 1 && route[0][3].op == 0, "read-write route");
    check(ev_oc_write[0] && !ev_oc_xbank[0], "OC write event");

    // 4. write has priority over a conflicting read
    clear();
    wq_avail[1] = 1; wq_head[1][0] = wr(2, 3'b111, 9);
    oc_req[0][0] = rd(1, 5, 3'b000);
    #1;
    check(ev_bank[1] == ACC_WR && !oc_grant[0][0], "write first, read waits");

    // 5. two reads of one instruction in one bank
    clear();
    oc_req[2][0] = rd(2, 8, 3'b001); oc_req[2][1] = rd(2, 9, 3'b001);
    #1;
    check(ev_bank[2] == ACC_RR_SAME && oc_grant[2][0] && oc_grant[2][1], "read-read same instruction");
    check(route[2][0].op == 0 && route[2][1].op == 0 && route[2][2].op == 1 && route[2][3].op == 1, "unpacking routes");

    // 6. two reads of different instructions in one bank
    clear();
    oc_req[1][0] = rd(3, 0, 3'b000); oc_req[3][2] = rd(3, 1, 3'b011);
    #1;
    check(ev_bank[3] == ACC_RR_DIFF && oc_grant[1][0] && oc_grant[3][2], "read-read different instructions");

    // 7. two banks fill one OC in the same cycle
    clear();
    oc_req[0][0] = rd(0, 2, 3'b000); oc_req[0][1] = rd(1, 3, 3'b000);
    #1;
    check(oc_grant[0][0] && oc_grant[0][1] && ev_oc_xbank[0], "cross-bank OC write coalescing");
    check(route[0][0].bank == 0 && route[0][3].bank == 1, "cross-bank routes");

    // 8. full-width reads into one OC from two banks -> OC port conflict
    clear();
    oc_req[0][0] = rd(0, 2, 3'b111); oc_req[0][1] = rd(1, 3, 3'b111);
    #1;
    check((oc_grant[0][0] ^ oc_grant[0][1]) && !ev_oc_xbank[0], "OC write port conflict");

    // 9. overlapping sub-banks in one bank -> bank conflict
    clear();
    oc_req[1][0] = rd(2, 4, 3'b011); oc_req[2][0] = rd(2, 5, 3'b011);
    #1;
    check(ev_bank[2] == ACC_RD && (oc_grant[1][0] ^ oc_grant[2][0]), "sub-bank overlap serialized");

    // 10. round robin: two full-width readers of one bank both served in time
    begin
      bit got1 = 0, got2 = 0;
      clear();
      oc_req[1][0] = rd(2, 4, 3'b111); oc_req[2][0] = rd(2, 6, 3'b111);
      for (int c = 0; c < 12; c++) begin
        @(negedge clk); #1;
        if (oc_grant[1][0]) got1 = 1;
        if (oc_grant[2][0]) got2 = 1;
      end
      check(got1 && got2, "round robin");
    end
    // 11. random requests: rules every cycle must obey
    for (int n = 0; n < 3000; n++) begin
      sbmask_t slice_use [4];
      @(negedge clk);
      clear();
      for (int b = 0; b < 4; b++) begin
        wq_avail[b] = 2'($urandom_range(0, 2));
        for (int k = 0; k < 2; k++) wq_head[b][k] = wr($urandom_range(0, 255), wmask_t'($urandom), k);
      end
      for (int o = 0; o < 4; o++) for (int i = 0; i < 3; i++)
        if ($urandom_range(0, 99) < 50) oc_req[o][i] = rd($urandom_range(0, 3), $urandom_range(0, 255), wmask_t'($urandom));
      #1;
      for (int o = 0; o < 4; o++) slice_use[o] = '0;
      for (int o = 0; o < 4; o++) for (int i = 0; i < 3; i++) if (oc_grant[o][i]) begin
        sbmask_t pm;
        pm = phys_mask(oc_req[o][i].wm, oc_req[o][i].entry[0]);
        check(oc_req[o][i].valid, "grant only to a request");
        check((slice_use[o] & pm) == 0, "OC slice used once");
        slice_use[o] |= pm;
        for (int s = 0; s < 4; s++) if (pm[s])
          check(route[o][s].valid && route[o][s].op == opidx_t'(i) && route[o][s].bank == oc_req[o][i].bank, "route of granted read");
      end
      for (int b = 0; b < 4; b++) begin
        int nreq, ngrant;
        bit any_rd;
        // bank ports never overlap and match the pops/grants
        check(!(cmd_a[b].valid && cmd_b[b].valid && (cmd_a[b].sbm & cmd_b[b].sbm) != 0), "disjoint ports");
        check(!(cmd_a[b].valid && cmd_b[b].valid && cmd_a[b].entry[0] == cmd_b[b].entry[0]), "even/odd pair");
        check(wq_pop[b] <= wq_avail[b], "pop within queue");
        // work conserving: a queued write is always served
        check(wq_avail[b] == 0 || (cmd_a[b].valid && cmd_a[b].we), "write served first");
        // an idle bank may only leave reads whose OC slices are taken
        any_rd = 0;
        for (int o = 0; o < 4; o++) for (int i = 0; i < 3; i++)
          if (oc_req[o][i].valid && oc_req[o][i].bank == bank_t'(b)
              && (slice_use[o] & phys_mask(oc_req[o][i].wm, oc_req[o][i].entry[0])) == 0) any_rd = 1;
        check(!(wq_avail[b] == 0 && any_rd && !cmd_a[b].valid), "idle bank with a servable read");
        nreq = int'(cmd_a[b].valid) + int'(cmd_b[b].valid);
        ngrant = int'(wq_pop[b]);
        for (int o = 0; o < 4; o++) for (int i = 0; i < 3; i++)
          if (oc_grant[o][i] && oc_req[o][i].bank == bank_t'(b)) ngrant++;
        check(nreq == ngrant, "one port per granted request");
      end
      for (int o = 0; o < 4; o++) for (int s = 0; s < 4; s++)
        check(route[o][s].valid == slice_use[o][s], "no stray route");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
