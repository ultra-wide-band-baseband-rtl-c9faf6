// pn_correlator: one PN correlator (accumulator plus downsampler).
//
// Every chip the accumulator adds +d_in or -d_in, as chosen by the PN chip
// pn_in (1 = +1, 0 = -1). On the first chip of a symbol (init_n high) the
// feedback is replaced by zero, so the sum restarts. The downsampler is a
// dump register fed from the adder output (the node before the accumulator
// register) and enabled by init_early, the strobe one chip before the
// symbol boundary; the complete symbol correlation is therefore in q_out
// from the first chip of the next symbol on, glitch-free and without a
// mux after the register.
//
// lock = 1 puts the correlator to sleep: both registers hold their value,
// which stands for the design's grounding of PN_in and holding of D_in.
//
// Widths: 12-bit input, 22-bit accumulator and output (enough for 1024
// chips). Structure and port set follow the design; the chip polarity
// mapping and treating sleep as a register hold are this design's choices.
module pn_correlator
  import uwb_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  pmf_t  d_in,
  input  logic  pn_in,
  input  logic  init_n,
  input  logic  init_early,
  input  logic  lock,
  output corr_t q_out
);
  corr_t acc, prod, sum;

  always_comb begin
    prod = pn_in ? corr_t'(d_in) : -corr_t'(d_in);
    sum  = (init_n ? corr_t'(0) : acc) + prod;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      acc   <= '0;
      q_out <= '0;
    end else if (!lock) begin
      acc <= sum;
      if (init_early) q_out <= sum;
    end
  end
endmodule
