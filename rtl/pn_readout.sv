// pn_readout: configurable PN readout counters ("Readout" block).
//
// One counter per correlation block addresses the PN register array. Each
// counter counts chips 0, 1, ..., wrap and then returns to 0, so the code
// length is wrap+1 chips (a 10-bit wrap covers codes up to 1024 chips; a
// modulo operator with a variable operand is avoided). On sym_load, the
// strobe one chip before each symbol boundary, counter r is loaded with its
// start phase so that it shows that phase on the first chip of the symbol:
//   - searching (lock = 0): pn_ph + r, or 0 if that start lies beyond wrap
//     (the overflow rule of the design);
//   - locked (lock = 1): counter 0, which also feeds the data correlators,
//     starts at pn_ph; all other counters are loaded with and held at 0.
// Counting, wrap, start phase and the overflow rule follow the design; the
// per-block phase offset r and the load strobe choice are this design's.
module pn_readout
  import uwb_pkg::*;
#(
  parameter int unsigned NR = 11
) (
  input  logic   clk,
  input  logic   sfreset,
  input  phase_t wrap,
  input  phase_t pn_ph,
  input  logic   sym_load,
  input  logic   lock,
  output phase_t pnread [NR]
);
  always_ff @(posedge clk) begin
    if (sfreset) begin
      for (int r = 0; r < NR; r++) pnread[r] <= '0;
    end else begin
      for (int r = 0; r < NR; r++) begin
        if (lock && r != 0) begin
          pnread[r] <= '0;
        end else if (sym_load) begin
          logic [PHW:0] start;
          start = {1'b0, pn_ph} + (PHW+1)'(r);
          pnread[r] <= (start > {1'b0, wrap}) ? '0 : start[PHW-1:0];
        end else begin
          pnread[r] <= (pnread[r] >= wrap) ? '0 : pnread[r] + 1'b1;
        end
      end
    end
  end
endmodule
