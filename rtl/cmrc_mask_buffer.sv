// cmrc_mask_buffer: the register-width buffer, one 3-bit mask (bytes 1..3
// needed) per warp register, 1024 registers = 384 bytes.
//
// The mask is written when the register's value leaves write-back and read
// when an instruction is placed in an operand collector, so that its reads can
// be sized and paired. NUM_WR synchronous write ports (one per write-back
// port; the higher port wins if two write one register), NUM_RD combinational
// read ports; a read of a register being written in the same cycle returns
// the new mask (write-through). Reset sets every mask to full width, so a register
// that was never written is read in full. Port counts and reset value are
// this design's choices.
module cmrc_mask_buffer
  import cmrc_pkg::*;
#(
  parameter int unsigned NUM_REGS = NUM_BANKS * BANK_ENTRIES,
  parameter int unsigned NUM_RD   = OPS_PER_OC,
  parameter int unsigned NUM_WR   = 2
)(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we    [NUM_WR],
  input  preg_t  waddr [NUM_WR],
  input  wmask_t wdata [NUM_WR],
  input  preg_t  raddr [NUM_RD],
  output wmask_t rdata [NUM_RD]
);
  wmask_t mem [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) mem[i] <= 3'b111;
    end else begin
      for (int k = 0; k < NUM_WR; k++) begin
        if (we[k]) mem[waddr[k]] <= wdata[k];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_RD; p++) begin
      rdata[p] = mem[raddr[p]];
      for (int k = 0; k < NUM_WR; k++) begin
        if (we[k] && waddr[k] == raddr[p]) rdata[p] = wdata[k];
      end
    end
  end
endmodule
