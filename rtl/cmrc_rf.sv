// cmrc_rf: coalescing-aware register file of one streaming multiprocessor.
//
// Narrow-width warp values (values whose upper bytes are only sign extension
// in every thread) do not need the full 128B register width. This register
// file stores each register in thread-interleaved form across four 32B
// sub-banks, left-aligns odd entries by a thread-local byte swap, and keeps a
// 3-bit width mask per register. Two narrow accesses to one bank, an even and
// an odd entry with disjoint sub-banks, then share a single bank access, and
// narrow reads from several banks share one OC write port.
//
// Datapath:
//   write-back -> width detect -> mask buffer
//              -> byte-swap/interleave -> per-bank write queue -> arbiter
//   issue      -> mask lookup -> free OC -> read requests -> arbiter
//   arbiter    -> 4 banks x 4 sub-banks -> four 32B crossbars -> OC slices
//   OC         -> dispatch select -> byte-swap/sign-extend -> dispatch
// There are thus five thread-local byte-swap MUX sets: one per write-back
// port and one per dispatched operand.
//
// Interfaces (all valid/ready):
//   wb_*   NUM_WB register writes per cycle (one per execution pipeline
//          writing back); port k is accepted when its bank's write queue has
//          room for it and for the lower ports writing the same bank. done[b][n] reports each write when it is
//          performed in its bank; the issue logic must not issue a reader of
//          a register before its write is reported (scoreboard release).
//   iss_*  one instruction per cycle into the lowest-numbered free OC.
//   disp_* the lowest-numbered complete OC is offered; the OC is freed when
//          disp_ready is high.
// Timing: a granted read is in the bank in cycle t, crosses the crossbar and
// is written into the OC in t+1; disp_valid rises in t+2. A write is
// performed the cycle its done flag is high and is readable the cycle after.
//
// The organisation (banks, sub-banks, crossbar slices, OC slice ports, byte
// swap, width masks, even/odd alignment) follows the CMRC design. Write
// queues, the arbitration order, the OC and dispatch selection and the
// register numbering are this design's choices.
module cmrc_rf
  import cmrc_pkg::*;
#(
  parameter layout_e     LAYOUT        = LAYOUT_WSHIFT,
  parameter int unsigned NUM_OC        = NUM_OCS,
  parameter int unsigned QDEPTH        = WQ_DEPTH,
  parameter int unsigned ENTRIES       = BANK_ENTRIES,
  parameter int unsigned REGS_WARP     = REGS_PER_WARP,
  parameter int unsigned NUM_WB        = 2
)(
  input  logic       clk,
  input  logic       rst_n,
  // write-back
  input  logic       wb_valid [NUM_WB],
  output logic       wb_ready [NUM_WB],
  input  warp_t      wb_warp  [NUM_WB],
  input  reg_t       wb_reg   [NUM_WB],
  input  warp_data_t wb_data  [NUM_WB],
  output wr_done_t   done [NUM_BANKS][2],
  // issue
  input  logic       iss_valid,
  output logic       iss_ready,
  input  warp_t      iss_warp,
  input  tag_t       iss_tag,
  input  logic       iss_src_valid [OPS_PER_OC],
  input  reg_t       iss_src_reg   [OPS_PER_OC],
  // dispatch
  output logic       disp_valid,
  input  logic       disp_ready,
  output warp_t      disp_warp,
  output tag_t       disp_tag,
  output warp_data_t disp_ops [OPS_PER_OC],
  // events for performance counters
  output acc_kind_e  ev_bank     [NUM_BANKS],
  output logic       ev_oc_write [NUM_OC],
  output logic       ev_oc_xbank [NUM_OC]
);
  // ---------------- write-back path ----------------
  localparam int unsigned CW = $clog2(QDEPTH + 1);
  bank_t     wb_bank  [NUM_WB];
  entry_t    wb_entry [NUM_WB];
  wmask_t    wb_wm    [NUM_WB];
  rf_line_t  wb_line  [NUM_WB];
  wq_entry_t wb_q     [NUM_WB];
  logic      wb_fire  [NUM_WB];
  preg_t     wb_preg  [NUM_WB];
  logic [CW-1:0] wq_free [NUM_BANKS];
  logic [1:0] wq_avail [NUM_BANKS];
  wq_entry_t wq_head  [NUM_BANKS][2];
  logic [1:0] wq_pop  [NUM_BANKS];

  for (genvar k = 0; k < NUM_WB; k++) begin : g_wb
    cmrc_reg_map #(.LAYOUT(LAYOUT), .REGS_WARP(REGS_WARP)) u_wb_map (
      .warp(wb_warp[k]), .rg(wb_reg[k]), .bank(wb_bank[k]), .entry(wb_entry[k]));
    cmrc_width_detect u_wdet (.data(wb_data[k]), .wm(wb_wm[k]));
    cmrc_align_wr     u_awr  (.data(wb_data[k]), .odd(wb_entry[k][0]), .line(wb_line[k]));
    assign wb_q[k]    = '{warp: wb_warp[k], rg: wb_reg[k], entry: wb_entry[k],
                          wm: wb_wm[k], data: wb_line[k]};
    assign wb_fire[k] = wb_valid[k] && wb_ready[k];
    assign wb_preg[k] = {wb_bank[k], wb_entry[k]};
  end

  // Port k is ready when its bank's queue has room for it and for every
  // lower-numbered port writing the same bank in this cycle.
  always_comb begin
    for (int k = 0; k < NUM_WB; k++) begin
      int need;
      need = 1;
      for (int j = 0; j < k; j++) begin
        if (wb_valid[j] && wb_bank[j] == wb_bank[k]) need++;
      end
      wb_ready[k] = (int'(wq_free[wb_bank[k]]) >= need);
    end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_wq
    logic push [NUM_WB];
    for (genvar k = 0; k < NUM_WB; k++) begin : g_push
      assign push[k] = wb_fire[k] && wb_bank[k] == bank_t'(b);
    end
    cmrc_write_queue #(.DEPTH(QDEPTH), .NPUSH(NUM_WB)) u_wq (
      .clk, .rst_n,
      .push      (push),
      .push_data (wb_q),
      .pop       (wq_pop[b]),
      .free_cnt  (wq_free[b]),
      .avail     (wq_avail[b]),
      .head      (wq_head[b])
    );
  end

  // ---------------- issue path ----------------
  bank_t   src_bank [OPS_PER_OC];
  entry_t  src_entry[OPS_PER_OC];
  preg_t   src_preg [OPS_PER_OC];
  wmask_t  src_wm   [OPS_PER_OC];
  rd_req_t src_req  [OPS_PER_OC];
  logic    oc_busy  [NUM_OC];
  logic    oc_alloc [NUM_OC];

  for (genvar i = 0; i < OPS_PER_OC; i++) begin : g_src
    cmrc_reg_map #(.LAYOUT(LAYOUT), .REGS_WARP(REGS_WARP)) u_map (
      .warp(iss_warp), .rg(iss_src_reg[i]), .bank(src_bank[i]), .entry(src_entry[i]));
    assign src_preg[i] = {src_bank[i], src_entry[i]};
    assign src_req[i]  = '{valid: iss_src_valid[i], bank: src_bank[i],
                           entry: src_entry[i], wm: src_wm[i]};
  end

  cmrc_mask_buffer #(.NUM_REGS(NUM_BANKS * ENTRIES), .NUM_RD(OPS_PER_OC), .NUM_WR(NUM_WB)) u_mbuf (
    .clk, .rst_n,
    .we    (wb_fire),
    .waddr (wb_preg),
    .wdata (wb_wm),
    .raddr (src_preg),
    .rdata (src_wm)
  );

  always_comb begin
    logic found;
    found     = 1'b0;
    iss_ready = 1'b0;
    for (int o = 0; o < NUM_OC; o++) begin
      oc_alloc[o] = 1'b0;
      if (!oc_busy[o] && !found) begin
        found       = 1'b1;
        iss_ready   = 1'b1;
        oc_alloc[o] = iss_valid;
      end
    end
  end

  // ---------------- arbitration and banks ----------------
  rd_req_t   oc_req   [NUM_OC][OPS_PER_OC];
  logic      oc_grant [NUM_OC][OPS_PER_OC];
  xroute_t   route_d  [NUM_OC][NUM_SUBBANKS];
  xroute_t   route_q  [NUM_OC][NUM_SUBBANKS];
  bank_cmd_t cmd_a    [NUM_BANKS];
  bank_cmd_t cmd_b    [NUM_BANKS];
  rf_line_t  bank_rd  [NUM_BANKS];

  cmrc_arbiter #(.N_BANKS(NUM_BANKS), .N_OCS(NUM_OC), .OPS(OPS_PER_OC)) u_arb (
    .clk, .rst_n,
    .wq_avail, .wq_head, .oc_req,
    .cmd_a, .cmd_b, .wq_pop, .oc_grant,
    .route       (route_d),
    .wr_done     (done),
    .ev_bank, .ev_oc_write, .ev_oc_xbank
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    cmrc_rf_bank #(.ENTRIES(ENTRIES)) u_bank (
      .clk, .cmd_a(cmd_a[b]), .cmd_b(cmd_b[b]), .rdata(bank_rd[b]));
  end

  // slice routes follow the bank read by one cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_OC; o++)
        for (int s = 0; s < NUM_SUBBANKS; s++) route_q[o][s] <= '0;
    end else begin
      route_q <= route_d;
    end
  end

  // ---------------- four 32B crossbars ----------------
  logic   oc_wr_en   [NUM_OC][NUM_SUBBANKS];
  opidx_t oc_wr_op   [NUM_OC][NUM_SUBBANKS];
  slice_t oc_wr_data [NUM_OC][NUM_SUBBANKS];

  for (genvar s = 0; s < NUM_SUBBANKS; s++) begin : g_xbar
    slice_t  xb_in  [NUM_BANKS];
    xroute_t xb_rt  [NUM_OC];
    logic    xb_we  [NUM_OC];
    opidx_t  xb_op  [NUM_OC];
    slice_t  xb_out [NUM_OC];
    for (genvar b = 0; b < NUM_BANKS; b++) begin : g_in
      assign xb_in[b] = bank_rd[b][s];
    end
    for (genvar o = 0; o < NUM_OC; o++) begin : g_out
      assign xb_rt[o]         = route_q[o][s];
      assign oc_wr_en[o][s]   = xb_we[o];
      assign oc_wr_op[o][s]   = xb_op[o];
      assign oc_wr_data[o][s] = xb_out[o];
    end
    cmrc_xbar_slice #(.N_BANKS(NUM_BANKS), .N_OCS(NUM_OC)) u_xbar (
      .bank_data(xb_in), .route(xb_rt), .oc_we(xb_we), .oc_op(xb_op), .oc_data(xb_out));
  end

  // ---------------- operand collectors and dispatch ----------------
  logic       oc_disp_valid [NUM_OC];
  logic       oc_release    [NUM_OC];
  warp_t      oc_warp       [NUM_OC];
  tag_t       oc_tag        [NUM_OC];
  rf_line_t   oc_line       [NUM_OC][OPS_PER_OC];
  logic       oc_odd        [NUM_OC][OPS_PER_OC];
  wmask_t     oc_wm         [NUM_OC][OPS_PER_OC];
  rf_line_t   sel_line      [OPS_PER_OC];
  logic       sel_odd       [OPS_PER_OC];
  wmask_t     sel_wm        [OPS_PER_OC];

  for (genvar o = 0; o < NUM_OC; o++) begin : g_oc
    cmrc_oc #(.OPS(OPS_PER_OC)) u_oc (
      .clk, .rst_n,
      .alloc      (oc_alloc[o]),
      .alloc_warp (iss_warp),
      .alloc_tag  (iss_tag),
      .alloc_src  (src_req),
      .busy       (oc_busy[o]),
      .req        (oc_req[o]),
      .grant      (oc_grant[o]),
      .wr_en      (oc_wr_en[o]),
      .wr_op      (oc_wr_op[o]),
      .wr_data    (oc_wr_data[o]),
      .disp_valid (oc_disp_valid[o]),
      .release_oc (oc_release[o]),
      .disp_warp  (oc_warp[o]),
      .disp_tag   (oc_tag[o]),
      .disp_line  (oc_line[o]),
      .disp_odd   (oc_odd[o]),
      .disp_wm    (oc_wm[o])
    );
  end

  always_comb begin
    int sel;
    sel        = -1;
    disp_valid = 1'b0;
    for (int o = 0; o < NUM_OC; o++) begin
      oc_release[o] = 1'b0;
      if (sel < 0 && oc_disp_valid[o]) sel = o;
    end
    disp_warp = '0;
    disp_tag  = '0;
    for (int i = 0; i < OPS_PER_OC; i++) begin
      sel_line[i] = '0;
      sel_odd[i]  = 1'b0;
      sel_wm[i]   = '0;
    end
    if (sel >= 0) begin
      disp_valid      = 1'b1;
      disp_warp       = oc_warp[sel];
      disp_tag        = oc_tag[sel];
      sel_line        = oc_line[sel];
      sel_odd         = oc_odd[sel];
      sel_wm          = oc_wm[sel];
      oc_release[sel] = disp_ready;
    end
  end

  // read-side byte-swap and sign extension, one per dispatched operand
  for (genvar i = 0; i < OPS_PER_OC; i++) begin : g_rd
    cmrc_align_rd u_ard (.line(sel_line[i]), .odd(sel_odd[i]), .wm(sel_wm[i]), .data(disp_ops[i]));
  end
endmodule
