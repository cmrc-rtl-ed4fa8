// Self-checking test of cmrc_xbar_slice: random routes from the four banks to
// the four OC slice ports, checking data, enable and operand index.
module tb_cmrc_xbar_slice;
  import cmrc_pkg::*;
  slice_t  bank_data [4];
  xroute_t route [4];
  logic    oc_we [4];
  opidx_t  oc_op [4];
  slice_t  oc_data [4];
  int checks = 0, failures = 0;

  cmrc_xbar_slice dut (.bank_data, .route, .oc_we, .oc_op, .oc_data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int b = 0; b < 4; b++)
        for (int w = 0; w < 8; w++) bank_data[b][32*w +: 32] = $urandom ^ (b << 28);
      for (int o = 0; o < 4; o++) begin
        route[o].valid = $urandom_range(0, 1);
        route[o].bank  = bank_t'($urandom);
        route[o].op    = opidx_t'($urandom_range(0, 2));
      end
      #1;
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (oc_we[o] !== route[o].valid || oc_op[o] !== route[o].op ||
            (route[o].valid && oc_data[o] !== bank_data[route[o].bank])) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d o=%0d", n, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
