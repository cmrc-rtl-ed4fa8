// Self-checking test of cmrc_mask_buffer: reset value, random writes on both
// write ports checked against a shadow array on all read ports, and
// same-cycle write-through.
module tb_cmrc_mask_buffer;
  import cmrc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we [2];
  preg_t waddr [2];
  wmask_t wdata [2];
  preg_t raddr [3];
  wmask_t rdata [3];
  wmask_t shadow [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmrc_mask_buffer dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin we[k] = 0; waddr[k] = 0; wdata[k] = 0; end
    for (int p = 0; p < 3; p++) raddr[p] = 0;
    for (int i = 0; i < 1024; i++) shadow[i] = 3'b111;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        we[k]    = $urandom_range(0, 1);
        waddr[k] = preg_t'($urandom_range(0, 63) + 64 * k);
        wdata[k] = wmask_t'($urandom);
      end
      for (int p = 0; p < 3; p++) raddr[p] = (p >= 1 && n % 5 == 0) ? waddr[p-1] : preg_t'($urandom_range(0, 127) + (n < 10 ? 800 : 0));
      #1;
      for (int p = 0; p < 3; p++) begin
        wmask_t exp;
        exp = shadow[raddr[p]];
        for (int k = 0; k < 2; k++) if (we[k] && raddr[p] == waddr[k]) exp = wdata[k];
        checks++;
        if (rdata[p] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d p=%0d addr=%0d got %b exp %b", n, p, raddr[p], rdata[p], exp);
        end
      end
      @(posedge clk);
      for (int k = 0; k < 2; k++) if (we[k]) shadow[waddr[k]] = wdata[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
