// coef_regs: PMF coefficient register array.
//
// The matched-filter taps are programmed from off-chip through a chain of
// enabled shift registers: while coef_en is high, every clock shifts c_in
// into tap 0 and moves each tap k to tap k+1, so after NTAPS enabled cycles
// the first word shifted in sits in tap NTAPS-1. With coef_en low the taps
// hold. Reset clears all taps. The shift-chain structure follows the
// design; a single clock for loading and operation and the shift direction
// are this implementation's choices.
module coef_regs
  import uwb_pkg::*;
#(
  parameter int unsigned NTAPS = 128
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              coef_en,
  input  coef_t             c_in,
  output coef_t             coef [NTAPS]
);
  coef_t chain [NTAPS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < NTAPS; k++) chain[k] <= '0;
    end else if (coef_en) begin
      chain[0] <= c_in;
      for (int k = 1; k < NTAPS; k++) chain[k] <= chain[k-1];
    end
  end

  assign coef = chain;
endmodule
