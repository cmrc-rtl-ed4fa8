// Self-checking test of cmrc_rf_bank: random pairs of requests with disjoint
// sub-bank masks (read/read, write/write, read/write) against a shadow copy
// of the sub-banks. Read data are checked one cycle after the request, which
// is the bank's read latency.
module tb_cmrc_rf_bank;
  import cmrc_pkg::*;
  localparam int NE = 16;   // entries exercised
  logic clk = 0;
  bank_cmd_t cmd_a, cmd_b;
  rf_line_t  rdata;
  slice_t    shadow [4][NE];
  int checks = 0, failures = 0;
  int coalesced = 0;

  always #5 clk = ~clk;

  cmrc_rf_bank dut (.clk, .cmd_a, .cmd_b, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic slice_t rand_slice();
    slice_t s;
    for (int w = 0; w < 8; w++) s[32*w +: 32] = $urandom;
    return s;
  endfunction

  initial begin
    sbmask_t   exp_m;
    slice_t    exp_d [4];
    cmd_a = '0; cmd_b = '0;
    exp_m = '0;
    // fill all entries at full width
    for (int e = 0; e < NE; e++) begin
      @(negedge clk);
      cmd_a = '0; cmd_a.valid = 1; cmd_a.we = 1; cmd_a.entry = entry_t'(e); cmd_a.sbm = 4'hF;
      for (int s = 0; s < 4; s++) begin cmd_a.wdata[s] = rand_slice(); shadow[s][e] = cmd_a.wdata[s]; end
    end
    for (int n = 0; n < 4000; n++) begin
      sbmask_t ma, mb;
      @(negedge clk);
      // check the reads issued in the previous cycle
      for (int s = 0; s < 4; s++) if (exp_m[s]) begin
        checks++;
        if (rdata[s] !== exp_d[s]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d sub-bank %0d read mismatch", n, s);
        end
      end
      ma = sbmask_t'($urandom);
      mb = sbmask_t'($urandom) & ~ma;
      cmd_a = '0; cmd_b = '0;
      cmd_a.valid = (ma != 0); cmd_a.we = $urandom_range(0, 1); cmd_a.entry = entry_t'($urandom_range(0, NE/2 - 1) * 2);
      cmd_b.valid = (mb != 0); cmd_b.we = $urandom_range(0, 1); cmd_b.entry = entry_t'($urandom_range(0, NE/2 - 1) * 2 + 1);
      cmd_a.sbm = ma; cmd_b.sbm = mb;
      for (int s = 0; s < 4; s++) begin cmd_a.wdata[s] = rand_slice(); cmd_b.wdata[s] = rand_slice(); end
      if (cmd_a.valid && cmd_b.valid) coalesced++;
      exp_m = '0;
      for (int s = 0; s < 4; s++) begin
        if (cmd_a.valid && ma[s]) begin
          if (cmd_a.we) shadow[s][cmd_a.entry] = cmd_a.wdata[s];
          else begin exp_m[s] = 1; exp_d[s] = shadow[s][cmd_a.entry]; end
        end
        if (cmd_b.valid && mb[s]) begin
          if (cmd_b.we) shadow[s][cmd_b.entry] = cmd_b.wdata[s];
          else begin exp_m[s] = 1; exp_d[s] = shadow[s][cmd_b.entry]; end
        end
      end
    end
    @(negedge clk);
    cmd_a = '0; cmd_b = '0;
    checks++;
    if (coalesced == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
