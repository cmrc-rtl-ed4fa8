// cmrc_reg_map: register-to-bank layout of the register file.
//
// wid_layout places all registers of a warp in bank (warp mod 4); the warp's
// registers are consecutive entries of that bank. wshift_layout interleaves a
// warp's registers across the banks, starting at bank (warp mod 4): register r
// of warp w goes to bank (w + r) mod 4, entry w*RPB + r/4, where RPB is the
// number of registers a warp keeps per bank. The exact entry numbering is this
// design's choice; entry parity decides the data alignment (even right, odd
// left). Purely combinational.
module cmrc_reg_map
  import cmrc_pkg::*;
#(
  parameter layout_e     LAYOUT        = LAYOUT_WSHIFT,
  parameter int unsigned REGS_WARP     = REGS_PER_WARP
)(
  input  warp_t  warp,
  input  reg_t   rg,
  output bank_t  bank,
  output entry_t entry
);
  localparam int unsigned RPB = (REGS_WARP + NUM_BANKS - 1) / NUM_BANKS;

  always_comb begin
    if (LAYOUT == LAYOUT_WID) begin
      bank  = bank_t'(int'(warp) % NUM_BANKS);
      entry = entry_t'((int'(warp) / NUM_BANKS) * REGS_WARP + int'(rg));
    end else begin
      bank  = bank_t'((int'(warp) + int'(rg)) % NUM_BANKS);
      entry = entry_t'(int'(warp) * RPB + int'(rg) / NUM_BANKS);
    end
  end
endmodule
