// cmrc_subbank: one 32B-wide sub-bank of a register-file bank, modelled as a
// single-ported SRAM array (one read or one write per cycle).
//
// The single port follows the 6T SRAM banks of the design; the one-cycle
// read latency is this design's choice. A read returns the row on the next clock edge (registered output, one cycle
// latency); the output holds its value in cycles without a read. The array
// has no reset, as an SRAM macro has none.
module cmrc_subbank
  import cmrc_pkg::*;
#(
  parameter int unsigned ENTRIES = BANK_ENTRIES
)(
  input  logic                       clk,
  input  logic                       en,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] addr,
  input  slice_t                     wdata,
  output slice_t                     rdata
);
  slice_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
