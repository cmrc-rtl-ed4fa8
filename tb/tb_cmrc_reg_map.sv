// Self-checking test of cmrc_reg_map for both layouts: every register of all
// 48 warps must get its own bank entry inside the bank, all registers of a
// warp share one bank in wid_layout, and consecutive registers rotate over the
// banks in wshift_layout.
module tb_cmrc_reg_map;
  import cmrc_pkg::*;
  warp_t  warp;
  reg_t   rg;
  bank_t  bank_w, bank_s;
  entry_t entry_w, entry_s;
  bit used_w [1024];
  bit used_s [1024];
  int checks = 0, failures = 0;

  cmrc_reg_map #(.LAYOUT(LAYOUT_WID))    u_wid (.warp, .rg, .bank(bank_w), .entry(entry_w));
  cmrc_reg_map #(.LAYOUT(LAYOUT_WSHIFT)) u_wsh (.warp, .rg, .bank(bank_s), .entry(entry_s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL w=%0d r=%0d: %s", warp, rg, what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NUM_WARPS; w++) begin
      for (int r = 0; r < REGS_PER_WARP; r++) begin
        warp = warp_t'(w); rg = reg_t'(r);
        #1;
        check(int'(bank_w) == w % 4, "wid bank");
        check(int'(bank_s) == (w + r) % 4, "wshift bank");
        check(!used_w[{bank_w, entry_w}], "wid entry reused");
        check(!used_s[{bank_s, entry_s}], "wshift entry reused");
        used_w[{bank_w, entry_w}] = 1;
        used_s[{bank_s, entry_s}] = 1;
      end
    end
    // wid: registers r and r+1 of a warp sit in the same bank with opposite parity
    warp = 7; rg = 4; #1;
    begin
      entry_t e0; e0 = entry_w; rg = 5; #1;
      check(entry_w[0] != e0[0], "wid parity alternates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
