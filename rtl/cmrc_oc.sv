// cmrc_oc: operand collector unit with per-32B write controls.
//
// An OC takes one warp instruction (up to OPS source registers), asks the
// arbiter for each operand read, captures the data as it arrives from the
// banks and, once every operand is complete, offers the instruction for
// dispatch.
//
// The single 128B write port behaves as four 32B write ports: port s writes
// slice s of any operand entry, chosen by its own operand index. A coalesced
// read therefore unpacks itself as it is written (two narrow registers read in
// one bank access land in their own entries), and narrow reads from different
// banks can fill one OC in the same cycle. Data are kept in register-file
// (thread-interleaved, aligned) form and offered in that form, with each
// operand's alignment and width mask; cmrc_rf restores them with
// cmrc_align_rd after the dispatch selection.
//
// The four 32B write ports with their own entry selects follow CMRC; the
// request/grant protocol, three operand entries and the tag are this
// design's choices.
//
// Timing: alloc in cycle t makes req valid from t+1. grant in cycle t clears
// the request; the data arrive through the slice ports in t+1. An operand is
// complete when all slices of its sub-bank mask were written; disp_valid rises
// the cycle after the last slice. release frees the OC.
module cmrc_oc
  import cmrc_pkg::*;
#(
  parameter int unsigned OPS = OPS_PER_OC
)(
  input  logic       clk,
  input  logic       rst_n,
  // allocation
  input  logic       alloc,
  input  warp_t      alloc_warp,
  input  tag_t       alloc_tag,
  input  rd_req_t    alloc_src [OPS],   // valid, bank, entry, width mask
  output logic       busy,
  // read requests to the arbiter
  output rd_req_t    req   [OPS],
  input  logic       grant [OPS],
  // four 32B write ports
  input  logic       wr_en   [NUM_SUBBANKS],
  input  opidx_t     wr_op   [NUM_SUBBANKS],
  input  slice_t     wr_data [NUM_SUBBANKS],
  // dispatch
  output logic       disp_valid,
  input  logic       release_oc,
  output warp_t      disp_warp,
  output tag_t       disp_tag,
  output rf_line_t   disp_line [OPS],   // operand as stored
  output logic       disp_odd  [OPS],   // operand came from an odd entry
  output wmask_t     disp_wm   [OPS]    // operand width mask
);
  rd_req_t  src     [OPS];
  logic     pending [OPS];   // read not yet granted
  sbmask_t  missing [OPS];   // slices not yet written
  rf_line_t buf_q   [OPS];
  warp_t    warp_q;
  tag_t     tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      for (int i = 0; i < OPS; i++) begin
        pending[i] <= 1'b0;
        missing[i] <= '0;
        src[i]     <= '0;
      end
      warp_q <= '0;
      tag_q  <= '0;
    end else begin
      if (alloc) begin
        busy   <= 1'b1;
        warp_q <= alloc_warp;
        tag_q  <= alloc_tag;
        for (int i = 0; i < OPS; i++) begin
          src[i]     <= alloc_src[i];
          pending[i] <= alloc_src[i].valid;
          missing[i] <= alloc_src[i].valid
                        ? phys_mask(alloc_src[i].wm, alloc_src[i].entry[0]) : '0;
        end
      end else begin
        if (release_oc) busy <= 1'b0;
        for (int i = 0; i < OPS; i++) begin
          if (grant[i]) pending[i] <= 1'b0;
        end
        for (int s = 0; s < NUM_SUBBANKS; s++) begin
          if (wr_en[s]) missing[wr_op[s]][s] <= 1'b0;
        end
      end
    end
  end

  // Operand buffers: each 32B slice has its own write enable and entry select.
  always_ff @(posedge clk) begin
    for (int s = 0; s < NUM_SUBBANKS; s++) begin
      if (wr_en[s]) buf_q[wr_op[s]][s] <= wr_data[s];
    end
  end

  always_comb begin
    disp_valid = busy;
    for (int i = 0; i < OPS; i++) begin
      req[i]       = src[i];
      req[i].valid = busy && pending[i];
      if (pending[i] || missing[i] != '0) disp_valid = 1'b0;
    end
  end

  assign disp_warp = warp_q;
  assign disp_tag  = tag_q;

  always_comb begin
    for (int i = 0; i < OPS; i++) begin
      disp_line[i] = buf_q[i];
      disp_odd[i]  = src[i].entry[0];
      disp_wm[i]   = src[i].wm;
    end
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) !(alloc && busy && !release_oc))
    else $error("cmrc_oc: allocated while busy");
  a_release_ready: assert property (@(posedge clk) disable iff (!rst_n) release_oc |-> disp_valid);
  a_grant_pending: assert property (@(posedge clk) disable iff (!rst_n)
    (grant[0] |-> req[0].valid));
endmodule
