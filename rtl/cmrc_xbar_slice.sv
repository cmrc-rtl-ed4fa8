// cmrc_xbar_slice: one of the four 32B crossbars between the banks and the
// operand collectors.
//
// Crossbar s connects sub-bank s of every bank to the 32B slice s of every OC
// write port. Each OC output has its own select (source bank) and valid, so
// different OCs can take slice s from different banks in the same cycle, and
// one OC can take its four slices from up to four banks. The split into four
// 32B crossbars follows CMRC; the route encoding is this design's choice.
// Combinational.
module cmrc_xbar_slice
  import cmrc_pkg::*;
#(
  parameter int unsigned N_BANKS = NUM_BANKS,
  parameter int unsigned N_OCS   = NUM_OCS
)(
  input  slice_t  bank_data [N_BANKS],
  input  xroute_t route     [N_OCS],
  output logic    oc_we     [N_OCS],
  output opidx_t  oc_op     [N_OCS],
  output slice_t  oc_data   [N_OCS]
);
  always_comb begin
    for (int o = 0; o < N_OCS; o++) begin
      oc_we[o]   = route[o].valid;
      oc_op[o]   = route[o].op;
      oc_data[o] = bank_data[route[o].bank];
    end
  end
endmodule
