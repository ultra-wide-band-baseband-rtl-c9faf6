// correlation_block: NSLICE PN correlators working on one PN code phase.
//
// Correlator k integrates PMF output z[k] against the block's PN chip
// stream pn_in over one symbol, so the block evaluates one code phase for
// every sample offset of the window at once (one cell of the search in
// code phase; all offsets in time). The block's q[k] holds the correlation
// of the previous symbol (see pn_correlator for the timing). lock puts all
// correlators to sleep during tracking.
module correlation_block
  import uwb_pkg::*;
#(
  parameter int unsigned NSLICE = 128
) (
  input  logic  clk,
  input  logic  reset,
  input  pmf_t  z [NSLICE],
  input  logic  pn_in,
  input  logic  init_n,
  input  logic  init_early,
  input  logic  lock,
  output corr_t q [NSLICE]
);
  for (genvar k = 0; k < NSLICE; k++) begin : g_corr
    pn_correlator u_corr (
      .clk, .reset,
      .d_in       (z[k]),
      .pn_in,
      .init_n,
      .init_early,
      .lock,
      .q_out      (q[k])
    );
  end
endmodule
