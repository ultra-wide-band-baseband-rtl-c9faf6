// pn_generator: PN code register array with one readout mux per counter.
//
// The PN code is held in PN_MAX one-bit registers loaded off-chip through
// a shift chain: while pn_en is high each clock shifts pn_in into register
// 0 and moves register j to j+1. Codes are therefore shifted in last chip
// first, so that after loading an L-chip code chip j sits in register j
// whatever L is. The registers do not move during operation; instead each
// of the NR readout counters (pn_readout) addresses a mux that reads one
// chip: pn_bit[r] = reg[pnread[r]]. This register-array-plus-mux structure
// is the one the design selected over a rotating shift-register ring,
// because the stored bits do not toggle while the receiver runs. Readout is
// combinational. Chip value 1 stands for +1 and 0 for -1.
module pn_generator
  import uwb_pkg::*;
#(
  parameter int unsigned PN_MAX = 1024,
  parameter int unsigned NR     = 11
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   pn_en,
  input  logic   pn_in,
  input  phase_t pnread [NR],
  output logic [NR-1:0] pn_bit
);
  logic [PN_MAX-1:0] code;

  always_ff @(posedge clk) begin
    if (reset)       code <= '0;
    else if (pn_en)  code <= {code[PN_MAX-2:0], pn_in};
  end

  always_comb begin
    for (int r = 0; r < NR; r++) pn_bit[r] = code[pnread[r]];
  end
endmodule
