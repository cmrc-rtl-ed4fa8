// Self-checking test of cmrc_oc: an instruction with three operands of mixed
// widths and alignments is allocated; the testbench plays the arbiter and the
// crossbar, granting reads and delivering slices (two operands' slices in the
// same cycle, as a coalesced read does). It checks the requests, that dispatch
// waits for the last slice and rises one cycle after it, that every slice
// landed in its own operand entry, and release.
module tb_cmrc_oc;
  import cmrc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc;
  warp_t alloc_warp;
  tag_t alloc_tag;
  rd_req_t alloc_src [3];
  logic busy;
  rd_req_t req [3];
  logic grant [3];
  logic wr_en [4];
  opidx_t wr_op [4];
  slice_t wr_data [4];
  logic disp_valid, release_oc;
  warp_t disp_warp;
  tag_t disp_tag;
  rf_line_t disp_line [3];
  logic     disp_odd [3];
  wmask_t   disp_wm [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmrc_oc dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  warp_data_t val [3];
  rf_line_t   line [3];
  wmask_t     wms [3];
  logic       odds [3];

  initial begin
    alloc = 0; release_oc = 0; alloc_warp = 0; alloc_tag = 0;
    for (int i = 0; i < 3; i++) begin alloc_src[i] = '0; grant[i] = 0; end
    for (int s = 0; s < 4; s++) begin wr_en[s] = 0; wr_op[s] = 0; wr_data[s] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // operand 0: 2-byte even, operand 1: 1-byte odd, operand 2: full or 3-byte
      wms[0] = 3'b001; odds[0] = 0;
      wms[1] = 3'b000; odds[1] = 1;
      wms[2] = round[0] ? 3'b111 : 3'b011; odds[2] = round[1];
      for (int i = 0; i < 3; i++) begin
        for (int t = 0; t < 32; t++) begin
          word_t r; r = $urandom;
          if (wms[i] == 3'b000) r = word_t'(signed'(r[7:0]));
          if (wms[i] == 3'b001) r = word_t'(signed'(r[15:0]));
          if (wms[i] == 3'b011) r = word_t'(signed'(r[23:0]));
          val[i][t] = r;
          for (int b = 0; b < 4; b++) line[i][odds[i] ? 3 - b : b][8*t +: 8] = r[8*b +: 8];
        end
      end
      @(negedge clk);
      alloc = 1; alloc_warp = warp_t'(round); alloc_tag = tag_t'(round * 3);
      for (int i = 0; i < 3; i++) alloc_src[i] = '{valid: 1'b1, bank: bank_t'(i), entry: entry_t'(10 + i * 2 + odds[i]), wm: wms[i]};
      @(negedge clk);
      alloc = 0;
      check(busy && !disp_valid, "busy after alloc");
      for (int i = 0; i < 3; i++) check(req[i].valid && req[i].entry == alloc_src[i].entry && req[i].wm == wms[i], "request");
      // cycle A: grant operands 0 and 1 (disjoint sub-banks: 0011 and 1000)
      grant[0] = 1; grant[1] = 1;
      @(negedge clk);
      grant[0] = 0; grant[1] = 0;
      check(!req[0].valid && !req[1].valid && req[2].valid, "grant clears requests");
      // data of cycle A arrive: op0 slices 0,1 ; op1 slice 3
      wr_en[0] = 1; wr_op[0] = 0; wr_data[0] = line[0][0];
      wr_en[1] = 1; wr_op[1] = 0; wr_data[1] = line[0][1];
      wr_en[3] = 1; wr_op[3] = 1; wr_data[3] = line[1][3];
      grant[2] = 1;
      @(negedge clk);
      grant[2] = 0;
      for (int s = 0; s < 4; s++) wr_en[s] = 0;
      check(!disp_valid, "not ready before operand 2");
      // operand 2 arrives
      for (int s = 0; s < 4; s++) if (phys_mask(wms[2], odds[2])[s]) begin
        wr_en[s] = 1; wr_op[s] = 2; wr_data[s] = line[2][s];
      end
      @(negedge clk);
      for (int s = 0; s < 4; s++) wr_en[s] = 0;
      check(disp_valid, "dispatch one cycle after last slice");
      check(disp_warp == warp_t'(round) && disp_tag == tag_t'(round * 3), "warp/tag");
      for (int i = 0; i < 3; i++) begin
        check(disp_odd[i] == odds[i] && disp_wm[i] == wms[i], $sformatf("operand %0d format", i));
        for (int s = 0; s < 4; s++) if (phys_mask(wms[i], odds[i])[s])
          check(disp_line[i][s] == line[i][s], $sformatf("operand %0d slice %0d", i, s));
      end
      release_oc = 1;
      @(negedge clk);
      release_oc = 0;
      check(!busy && !disp_valid, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
