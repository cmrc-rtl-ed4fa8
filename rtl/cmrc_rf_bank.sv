// cmrc_rf_bank: a register-file bank built from four 32B sub-banks, each with
// its own read/write and address control.
//
// Two requests can be served in one cycle when they touch disjoint sub-banks
// (port A and port B, each with a 4-bit physical sub-bank mask); this is how a
// narrow even-entry access and a narrow odd-entry access, reads or writes, are
// coalesced into one bank access. Sub-bank s takes its control from whichever
// port has bit s set in its mask. A read's data appears on rdata one cycle
// later, slice s coming from sub-bank s; slices not read hold old data.
// An assertion checks that the two masks never overlap. The per-sub-bank
// controls and the disjoint-mask rule follow CMRC; the two fixed ports and
// the one-cycle read latency are this design's choices.
module cmrc_rf_bank
  import cmrc_pkg::*;
#(
  parameter int unsigned ENTRIES = BANK_ENTRIES
)(
  input  logic      clk,
  input  bank_cmd_t cmd_a,
  input  bank_cmd_t cmd_b,
  output rf_line_t  rdata
);
  for (genvar s = 0; s < NUM_SUBBANKS; s++) begin : g_sb
    logic sel_a, sel_b;
    assign sel_a = cmd_a.valid && cmd_a.sbm[s];
    assign sel_b = cmd_b.valid && cmd_b.sbm[s];

    cmrc_subbank #(.ENTRIES(ENTRIES)) u_sb (
      .clk   (clk),
      .en    (sel_a || sel_b),
      .we    (sel_a ? cmd_a.we : cmd_b.we),
      .addr  (sel_a ? cmd_a.entry[$clog2(ENTRIES)-1:0] : cmd_b.entry[$clog2(ENTRIES)-1:0]),
      .wdata (sel_a ? cmd_a.wdata[s] : cmd_b.wdata[s]),
      .rdata (rdata[s])
    );
  end

  a_disjoint: assert property (@(posedge clk)
    !(cmd_a.valid && cmd_b.valid && ((cmd_a.sbm & cmd_b.sbm) != '0)))
    else $error("cmrc_rf_bank: coalesced requests overlap on a sub-bank");
endmodule
