// cmrc_pkg: shared constants and types of the coalescing-aware GPU register
// file (one streaming multiprocessor).
//
// A warp register is 32 threads x 32 bits = 128 bytes. Inside the register
// file it is held in thread-interleaved form: the 128B line is cut into four
// 32B slices, and slice s holds one byte position of all 32 threads. Each slice
// lives in its own sub-bank, so a register whose values need only the low k
// bytes touches only k sub-banks. Even bank entries are right-aligned (byte 0
// in sub-bank 0), odd entries are left-aligned (byte 0 in sub-bank 3), so a
// narrow even register and a narrow odd register can share one bank access.
//
// The sizes (4 banks, 4 OCs, 128KB per SM, 48 warps, 32 threads, 128B bank
// width, four 32B sub-banks) follow the evaluated Fermi-like configuration.
// Registers per warp, write-queue depth and operands per collector are this
// design's own choices.
package cmrc_pkg;

  localparam int unsigned WARP_SIZE     = 32;
  localparam int unsigned NUM_SUBBANKS  = 4;              // 4 x 32B = 128B
  localparam int unsigned SLICE_BITS    = 8 * WARP_SIZE;  // one byte of each thread
  localparam int unsigned NUM_BANKS     = 4;
  localparam int unsigned BANK_ENTRIES  = 256;            // 128KB / 4 banks / 128B
  localparam int unsigned NUM_OCS       = 4;
  localparam int unsigned OPS_PER_OC    = 3;
  localparam int unsigned NUM_WARPS     = 48;
  localparam int unsigned REGS_PER_WARP = 20;
  localparam int unsigned WQ_DEPTH      = 4;
  localparam int unsigned TAG_BITS      = 8;

  typedef logic [31:0]                     word_t;
  typedef word_t [WARP_SIZE-1:0]           warp_data_t;  // thread t = element t
  typedef logic [SLICE_BITS-1:0]           slice_t;      // byte of thread t at [8t+:8]
  typedef slice_t [NUM_SUBBANKS-1:0]       rf_line_t;    // element s = sub-bank s
  typedef logic [NUM_SUBBANKS-1:0]         sbmask_t;     // physical sub-bank enables
  typedef logic [2:0]                      wmask_t;      // bytes 1..3 needed (byte 0 implicit)
  typedef logic [1:0]                      bank_t;
  typedef logic [7:0]                      entry_t;
  typedef logic [9:0]                      preg_t;       // {bank, entry}
  typedef logic [5:0]                      warp_t;
  typedef logic [4:0]                      reg_t;
  typedef logic [1:0]                      oc_t;
  typedef logic [1:0]                      opidx_t;
  typedef logic [TAG_BITS-1:0]             tag_t;

  typedef enum logic {LAYOUT_WID = 1'b0, LAYOUT_WSHIFT = 1'b1} layout_e;

  // What a bank did in one cycle.
  typedef enum logic [2:0] {
    ACC_NONE    = 3'd0,
    ACC_RD      = 3'd1,  // one read
    ACC_WR      = 3'd2,  // one write
    ACC_RR_SAME = 3'd3,  // two reads of the same instruction coalesced
    ACC_RR_DIFF = 3'd4,  // two reads of different instructions coalesced
    ACC_WW      = 3'd5,  // two writes coalesced
    ACC_RW      = 3'd6   // one read and one write coalesced
  } acc_kind_e;

  // Logical byte mask (bit b = byte b stored) to physical sub-bank mask.
  // Odd entries are byte-swapped: byte b lives in sub-bank 3-b.
  function automatic sbmask_t phys_mask(wmask_t wm, logic odd);
    sbmask_t l;
    l = {wm, 1'b1};
    return odd ? {l[0], l[1], l[2], l[3]} : l;
  endfunction

  // One request port into a bank.
  typedef struct packed {
    logic     valid;
    logic     we;
    entry_t   entry;
    sbmask_t  sbm;
    rf_line_t wdata;
  } bank_cmd_t;

  // A register write waiting for its bank.
  typedef struct packed {
    warp_t    warp;
    reg_t     rg;
    entry_t   entry;
    wmask_t   wm;
    rf_line_t data;   // already aligned and thread-interleaved
  } wq_entry_t;

  // An operand read an OC asks for.
  typedef struct packed {
    logic   valid;
    bank_t  bank;
    entry_t entry;
    wmask_t wm;
  } rd_req_t;

  // Route of one 32B slice into one OC write port.
  typedef struct packed {
    logic   valid;
    bank_t  bank;
    opidx_t op;
  } xroute_t;

  // A register write that the banks performed.
  typedef struct packed {
    logic  valid;
    warp_t warp;
    reg_t  rg;
  } wr_done_t;

endpackage
