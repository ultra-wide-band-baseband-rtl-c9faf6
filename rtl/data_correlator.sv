// data_correlator: tracking-mode selectors and data PN correlators.
//
// Three muxes take the early, on-time and late PMF outputs, z[maxadr-spc],
// z[maxadr] and z[maxadr+spc], and three PN correlators integrate them
// over a symbol against PN readout 0, which the controller aligns to the
// symbol boundary once the signal is acquired. A neighbour address outside
// the slice range is clamped to the edge slice. Moving maxadr by one shifts
// the receiver's reference timing by one sample, which is how code tracking
// works here instead of a clocked PN generator. q_e/q_o/q_l hold the
// previous symbol's correlations (see pn_correlator); sleep holds them.
// Structure follows the design; the clamping is this design's choice.
module data_correlator
  import uwb_pkg::*;
#(
  parameter int unsigned NSLICE = 128,
  parameter int unsigned AW     = $clog2(NSLICE)
) (
  input  logic          clk,
  input  logic          reset,
  input  pmf_t          z [NSLICE],
  input  logic [AW-1:0] maxadr,
  input  logic [AW-1:0] spc,
  input  logic          pn_in,
  input  logic          init_n,
  input  logic          init_early,
  input  logic          sleep,
  output corr_t         q_e,
  output corr_t         q_o,
  output corr_t         q_l
);
  pmf_t d_e, d_o, d_l;

  always_comb begin
    int e, l;
    e = int'(maxadr) - int'(spc);
    l = int'(maxadr) + int'(spc);
    if (e < 0)            e = 0;
    if (l > NSLICE - 1)   l = NSLICE - 1;
    d_e = z[e];
    d_o = z[maxadr];
    d_l = z[l];
  end

  pn_correlator u_early (.clk, .reset, .d_in(d_e), .pn_in, .init_n, .init_early,
                         .lock(sleep), .q_out(q_e));
  pn_correlator u_ontime(.clk, .reset, .d_in(d_o), .pn_in, .init_n, .init_early,
                         .lock(sleep), .q_out(q_o));
  pn_correlator u_late  (.clk, .reset, .d_in(d_l), .pn_in, .init_n, .init_early,
                         .lock(sleep), .q_out(q_l));
endmodule
