// End-to-end test of cmrc_rf at its default size (4 banks x 256 entries,
// 4 operand collectors, 48 warps x 20 registers, wshift layout).
//
// The testbench plays write-back, issue and dispatch. It first writes every
// register, then runs a random mix of register writes and 1-3 operand
// instructions. Values are narrow with the mix 1 byte 35%, 2 bytes 25%,
// 3 bytes 10%, full 30%, positive and negative. It keeps a shadow register
// file and acts as the scoreboard: no instruction reads a register whose write
// is not yet reported done, and no register is rewritten while an instruction
// that reads it is still in an OC. Every dispatched operand is compared with
// the shadow value from issue time. It counts how often each mechanism
// happened (each kind of coalesced bank access, cross-bank OC write
// coalescing, bank and OC port conflicts, full OCs, dispatch back-pressure)
// and fails if one never did. It also prints the bank-access reduction.
// A final directed step measures issue-to-dispatch latency for two operands
// of one bank: 3 cycles when their reads are coalesced, 4 when serialized.
module tb_cmrc_rf;
  import cmrc_pkg::*;
  localparam int NW = NUM_WARPS, NR = REGS_PER_WARP;
  localparam int N_INSTR = 4000;

  logic clk = 0, rst_n = 0;
  localparam int NWB = 2;
  logic       wb_valid [NWB], wb_ready [NWB];
  warp_t      wb_warp  [NWB];
  reg_t       wb_reg   [NWB];
  warp_data_t wb_data  [NWB];
  wr_done_t   done [NUM_BANKS][2];
  logic       iss_valid, iss_ready;
  warp_t      iss_warp;
  tag_t       iss_tag;
  logic       iss_src_valid [OPS_PER_OC];
  reg_t       iss_src_reg   [OPS_PER_OC];
  logic       disp_valid, disp_ready;
  warp_t      disp_warp;
  tag_t       disp_tag;
  warp_data_t disp_ops [OPS_PER_OC];
  acc_kind_e  ev_bank     [NUM_BANKS];
  logic       ev_oc_write [NUM_OCS];
  logic       ev_oc_xbank [NUM_OCS];

  always #5 clk = ~clk;

  cmrc_rf dut (.*);

  // ---------------- reference state ----------------
  warp_data_t shadow  [NW][NR];
  bit         wr_busy [NW][NR];
  int         rd_cnt  [NW][NR];
  bit         tag_used [256];
  warp_data_t exp_ops  [256][OPS_PER_OC];
  bit         exp_vld  [256][OPS_PER_OC];
  reg_t       exp_reg  [256][OPS_PER_OC];
  warp_t      exp_warp [256];

  int checks = 0, failures = 0;
  int n_acc [7];
  int n_xbank = 0, n_ocw = 0, n_rd_req = 0, n_wr_req = 0;
  int n_wq_full = 0;
  int n_bank_conflict = 0, n_oc_full = 0, n_disp_stall = 0;
  int writes_sent = 0, writes_done = 0, instr_sent = 0, instr_done = 0;
  int cycle = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic warp_data_t gen_value();
    warp_data_t v;
    int pct, nb;
    pct = $urandom_range(0, 99);
    nb  = (pct < 35) ? 1 : (pct < 60) ? 2 : (pct < 70) ? 3 : 4;
    for (int t = 0; t < WARP_SIZE; t++) begin
      word_t r;
      r = $urandom;
      if (nb == 1) r = word_t'(signed'(r[7:0]));
      if (nb == 2) r = word_t'(signed'(r[15:0]));
      if (nb == 3) r = word_t'(signed'(r[23:0]));
      v[t] = r;
    end
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: writes %0d/%0d instr %0d/%0d", writes_done, writes_sent, instr_done, instr_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int init_w, init_r;
    bit init_done;
    tag_t next_tag;
    bit wb_acc [NWB];
    bit iss_acc;
    bit burst;
    for (int k = 0; k < NWB; k++) begin
      wb_valid[k] = 0; wb_warp[k] = 0; wb_reg[k] = 0; wb_data[k] = '0; wb_acc[k] = 0;
    end
    iss_valid = 0; iss_warp = 0; iss_tag = 0; disp_ready = 0;
    for (int i = 0; i < OPS_PER_OC; i++) begin iss_src_valid[i] = 0; iss_src_reg[i] = 0; end
    init_w = 0; init_r = 0; init_done = 0; next_tag = 0; iss_acc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    while (!(init_done && instr_sent == N_INSTR && instr_done == N_INSTR && writes_done == writes_sent)) begin
      @(negedge clk);
      cycle++;
      for (int k = 0; k < NWB; k++) if (wb_acc[k]) wb_valid[k] = 0;
      if (iss_acc) iss_valid = 0;
      // ----- choose new writes, one per write-back port -----
      // Every 500 cycles both ports aim at bank 0 for 40 cycles (write burst).
      burst = init_done && (cycle % 500) < 40;
      for (int k = 0; k < NWB; k++) if (!wb_valid[k]) begin
        if (!init_done) begin
          wb_valid[k] = 1; wb_warp[k] = warp_t'(init_w); wb_reg[k] = reg_t'(init_r);
        end else if (instr_sent < N_INSTR && (burst || $urandom_range(0, 99) < 30)) begin
          int w, r;
          w = $urandom_range(0, NW - 1); r = $urandom_range(0, NR - 1);
          if (burst) r = (NUM_BANKS - w % NUM_BANKS) % NUM_BANKS + 4 * $urandom_range(0, NR / 4 - 1); // bank 0
          if (!wr_busy[w][r] && rd_cnt[w][r] == 0) begin
            wb_valid[k] = 1; wb_warp[k] = warp_t'(w); wb_reg[k] = reg_t'(r);
          end
        end
        if (wb_valid[k]) begin
          wb_data[k] = gen_value();
          shadow[wb_warp[k]][wb_reg[k]]  = wb_data[k];
          wr_busy[wb_warp[k]][wb_reg[k]] = 1;
          writes_sent++;
          if (!init_done) begin
            init_r++;
            if (init_r == NR) begin init_r = 0; init_w++; end
            if (init_w == NW) init_done = 1;
          end
        end
      end
      // ----- choose a new instruction -----
      if (!iss_valid && init_done && instr_sent < N_INSTR && !tag_used[next_tag]
          && $urandom_range(0, 99) < 80) begin
        int w, nsrc;
        bit ok;
        w = $urandom_range(0, NW - 1);
        nsrc = $urandom_range(1, OPS_PER_OC);
        ok = 1;
        for (int i = 0; i < OPS_PER_OC; i++) begin
          iss_src_valid[i] = (i < nsrc);
          iss_src_reg[i]   = reg_t'($urandom_range(0, NR - 1));
          if (i < nsrc && wr_busy[w][iss_src_reg[i]]) ok = 0;
        end
        if (ok) begin
          iss_valid = 1; iss_warp = warp_t'(w); iss_tag = next_tag;
          tag_used[next_tag] = 1;
          exp_warp[next_tag] = warp_t'(w);
          for (int i = 0; i < OPS_PER_OC; i++) begin
            exp_vld[next_tag][i] = iss_src_valid[i];
            exp_reg[next_tag][i] = iss_src_reg[i];
            exp_ops[next_tag][i] = shadow[w][iss_src_reg[i]];
            if (iss_src_valid[i]) rd_cnt[w][iss_src_reg[i]]++;
          end
          next_tag++;
          instr_sent++;
        end else begin
          for (int i = 0; i < OPS_PER_OC; i++) iss_src_valid[i] = 0;
        end
      end
      disp_ready = ($urandom_range(0, 99) < 75);

      #1;
      // ----- what happens at the next clock edge -----
      for (int k = 0; k < NWB; k++) begin
        wb_acc[k] = wb_valid[k] && wb_ready[k];
        if (wb_valid[k] && !wb_ready[k]) n_wq_full++;
      end
      iss_acc = iss_valid && iss_ready;
      if (iss_valid && !iss_ready) n_oc_full++;
      if (disp_valid && !disp_ready) n_disp_stall++;
      if (disp_valid && disp_ready) begin
        check(tag_used[disp_tag], "dispatched tag was issued");
        check(disp_warp == exp_warp[disp_tag], "dispatched warp");
        for (int i = 0; i < OPS_PER_OC; i++) if (exp_vld[disp_tag][i]) begin
          check(disp_ops[i] == exp_ops[disp_tag][i],
                $sformatf("tag %0d operand %0d (warp %0d r%0d)", disp_tag, i, disp_warp, exp_reg[disp_tag][i]));
          rd_cnt[disp_warp][exp_reg[disp_tag][i]]--;
        end
        tag_used[disp_tag] = 0;
        instr_done++;
      end
      for (int b = 0; b < NUM_BANKS; b++) for (int n = 0; n < 2; n++) if (done[b][n].valid) begin
        check(wr_busy[done[b][n].warp][done[b][n].rg], "write done for a pending write");
        wr_busy[done[b][n].warp][done[b][n].rg] = 0;
        writes_done++;
      end
      for (int b = 0; b < NUM_BANKS; b++) begin
        n_acc[int'(ev_bank[b])]++;
      end
      for (int o = 0; o < NUM_OCS; o++) begin
        if (ev_oc_xbank[o]) n_xbank++;
        if (ev_oc_write[o]) n_ocw++;
        for (int i = 0; i < OPS_PER_OC; i++) begin
          if (dut.oc_req[o][i].valid) begin
            n_rd_req++;
            if (!dut.oc_grant[o][i]) n_bank_conflict++;
          end
        end
      end
    end

    // ----- directed latency check -----
    // Two operands in one bank, even and odd entries. When both are 1-byte
    // values the two reads share one bank access and the instruction is
    // offered 3 cycles after the issue cycle; when both are full width the
    // reads are serialized and it takes one cycle more.
    begin
      int r2;
      int lat [2];
      r2 = (dut.LAYOUT == LAYOUT_WID) ? 1 : NUM_BANKS;   // same bank, other parity
      disp_ready = 1;
      for (int pass = 0; pass < 2; pass++) begin
        for (int k = 0; k < 2; k++) begin
          @(negedge clk);
          wb_valid[0] = 1; wb_warp[0] = 0; wb_reg[0] = reg_t'(k == 0 ? 0 : r2);
          for (int t = 0; t < WARP_SIZE; t++)
            wb_data[0][t] = (pass == 0) ? word_t'(signed'(8'(t * 37 + k))) : 32'h8000_0001 + t + k;
          shadow[0][wb_reg[0]] = wb_data[0];
          #1;
          check(wb_ready[0], "write accepted");
        end
        @(negedge clk);
        wb_valid[0] = 0;
        repeat (4) @(negedge clk);
        iss_valid = 1; iss_warp = 0; iss_tag = 8'hEE;
        iss_src_valid[0] = 1; iss_src_reg[0] = 0;
        iss_src_valid[1] = 1; iss_src_reg[1] = reg_t'(r2);
        iss_src_valid[2] = 0;
        #1;
        check(iss_ready, "directed issue accepted");
        lat[pass] = 0;
        @(negedge clk);
        iss_valid = 0;
        #1;
        while (!disp_valid && lat[pass] < 20) begin
          lat[pass]++;
          @(negedge clk);
          #1;
        end
        lat[pass]++;
        check(disp_tag == 8'hEE && disp_ops[0] == shadow[0][0] && disp_ops[1] == shadow[0][r2],
              "directed operands");
        @(negedge clk);
      end
      $display("issue to dispatch: %0d cycles coalesced, %0d cycles serialized", lat[0], lat[1]);
      check(lat[0] == 3, "coalesced operand reads: dispatch 3 cycles after issue");
      check(lat[1] == 4, "serialized operand reads: dispatch 4 cycles after issue");
    end

    begin
      int acc, reqs;
      acc  = n_acc[1] + n_acc[2] + n_acc[3] + n_acc[4] + n_acc[5] + n_acc[6];
      reqs = n_acc[1] + n_acc[2] + 2 * (n_acc[3] + n_acc[4] + n_acc[5] + n_acc[6]);
      $display("bank accesses %0d for %0d requests (%0d%% fewer)", acc, reqs, 100 * (reqs - acc) / reqs);
      $display("single rd %0d wr %0d | coalesced rr-same %0d rr-diff %0d ww %0d rw %0d",
               n_acc[1], n_acc[2], n_acc[3], n_acc[4], n_acc[5], n_acc[6]);
      $display("OC writes %0d, cross-bank coalesced %0d; waiting read-cycles %0d; OC full %0d; dispatch stalls %0d",
               n_ocw, n_xbank, n_bank_conflict, n_oc_full, n_disp_stall);
      $display("write-back stalls on a full write queue %0d", n_wq_full);
      $display("writes %0d, instructions %0d, cycles %0d", writes_done, instr_done, cycle);
    end
    check(n_acc[3] > 0, "read-read coalescing, same instruction");
    check(n_acc[4] > 0, "read-read coalescing, different instructions");
    check(n_acc[5] > 0, "write-write coalescing");
    check(n_acc[6] > 0, "read-write coalescing");
    check(n_xbank > 0,  "cross-bank OC write coalescing");
    check(n_bank_conflict > 0, "port conflict (request waits)");
    check(n_wq_full > 0, "write queue full");
    check(n_oc_full > 0, "all OCs busy");
    check(n_disp_stall > 0, "dispatch back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
