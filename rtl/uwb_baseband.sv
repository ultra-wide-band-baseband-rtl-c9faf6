// uwb_baseband: digital baseband of an impulse (carrier-less) UWB receiver.
//
// Once per chip (pulse repetition period) the front end delivers a window
// of NTAPS+NSLICE one-bit samples, s. The pulse matched filter (pmf) turns
// it into NSLICE matched-filter values, one per sample offset. NB
// correlation blocks of NSLICE PN correlators each integrate those values
// over one symbol (wrap+1 chips) against one PN code phase, so a symbol
// tests NB code phases at every offset at once. A peak detector per block
// finds the largest correlation and its slice address and compares it with
// threshold_s; lock_detect combines the flags. main_ctrl steps the searched
// phases, and after a hit realigns the symbol boundary (symbol_strobe) to
// chip PN0, puts the correlation blocks to sleep and keeps three slices
// alive: on-time maxadr and early/late at +/-spc. The data correlators
// integrate those three, data_recovery flags early/late drift, tests the
// on-time magnitude against threshold_t and makes the hard decision. sh_win
// asks the analog front end to move the sampling window.
//
// Registers: the input window is registered once (the parallel buffer
// boundary); everything runs on one chip-rate clock. Coefficients and the
// PN code are shifted in through coef_en/c_in (one 5-bit tap per clock, last
// tap first) and pn_en/pn_in (one chip per clock, last chip first). reset
// clears all registers; sfreset restarts the controller. data_valid pulses
// for one clock on each symbol boundary in tracking mode, while data_out
// (soft value) and data_bit (hard decision) hold the finished symbol.
//
// Following the design: the block structure, sizes (128 taps x 128 slices,
// 11 correlation blocks, codes up to 1024 chips), widths and the control
// I/O. This design's own: a single clock, the added n_consec port for the
// early/late filter length, the status outputs lock/mode/maxadr/data_bit/
// data_valid, and the "count minus one" reading of wrap and num_corr. The
// window-size input cliff of the original I/O list is not present: here
// the searched window is set by num_corr.
//
// Two internal signals are left unread on purpose: the chip counter value of
// symbol_strobe and the per-block peak values of the peak detectors. Only
// the threshold flags and addresses drive the controller; the values are
// there for probing and synthesis removes them.
module uwb_baseband
  import uwb_pkg::*;
#(
  parameter int unsigned NTAPS  = 128,
  parameter int unsigned NSLICE = 128,
  parameter int unsigned NB     = 11,
  parameter int unsigned PN_MAX = 1024,
  parameter int unsigned NS     = NTAPS + NSLICE,
  parameter int unsigned AW     = $clog2(NSLICE)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           sfreset,
  // sample window and always-on mode
  input  logic [NS-1:0]  s,
  input  logic           al,
  // programming
  input  coef_t          c_in,
  input  logic           coef_en,
  input  logic           pn_in,
  input  logic           pn_en,
  // configuration
  input  phase_t         wrap,
  input  logic [AW-1:0]  num_corr,
  input  logic [CBW-1:0] num_cb,
  input  logic [AW-1:0]  spc,
  input  logic [AW-1:0]  guard,
  input  logic [AW-1:0]  num_sh,
  input  logic [3:0]     n_consec,
  input  corr_t          threshold_s,
  input  corr_t          threshold_t,
  // outputs
  output corr_t          data_out,
  output logic           data_bit,
  output logic           data_valid,
  output logic [1:0]     sh_win,
  output logic           lock,
  output mode_t          mode,
  output logic [AW-1:0]  maxadr
);
  logic [NS-1:0]     s_q;
  coef_t             coef [NTAPS];
  logic [NSLICE-1:0] g;
  pmf_t              z [NSLICE];
  phase_t            pnread [NB];
  logic [NB-1:0]     pn_bit;
  phase_t            pn_ph, strobe_ph, chip_cnt;
  logic              init_c, init_early;
  corr_t             q [NB][NSLICE];
  corr_t             blk_max [NB];
  logic [AW-1:0]     blk_adr [NB];
  logic [NB-1:0]     at_i;
  logic              at;
  logic [CBW-1:0]    which_b;
  logic [AW-1:0]     adr;
  corr_t             q_e, q_o, q_l;
  logic              early, late, at_track;

  // parallel input buffer
  always_ff @(posedge clk) begin
    if (reset) s_q <= '0;
    else       s_q <= s;
  end

  coef_regs #(.NTAPS(NTAPS)) u_coef (
    .clk, .reset, .coef_en, .c_in, .coef
  );

  pmf_decoder #(.NSLICE(NSLICE)) u_dec (
    .track(lock), .num_corr, .maxadr, .spc, .g
  );

  pmf #(.NTAPS(NTAPS), .NSLICE(NSLICE), .NS(NS)) u_pmf (
    .clk, .reset, .s(s_q), .coef, .g, .al, .z
  );

  symbol_strobe u_strobe (
    .clk, .reset, .wrap, .strobe_ph, .chip_cnt, .init_c, .init_early
  );

  pn_readout #(.NR(NB)) u_readout (
    .clk, .sfreset(sfreset | reset), .wrap, .pn_ph, .sym_load(init_early),
    .lock, .pnread
  );

  pn_generator #(.PN_MAX(PN_MAX), .NR(NB)) u_pngen (
    .clk, .reset, .pn_en, .pn_in, .pnread, .pn_bit
  );

  for (genvar b = 0; b < NB; b++) begin : g_blk
    correlation_block #(.NSLICE(NSLICE)) u_cb (
      .clk, .reset,
      .z,
      .pn_in      (pn_bit[b]),
      .init_n     (init_c),
      .init_early,
      .lock       (lock || (b >= int'(num_cb))),
      .q          (q[b])
    );
    peak_detector #(.NSLICE(NSLICE)) u_pd (
      .q       (q[b]),
      .thr     (threshold_s),
      .max_val (blk_max[b]),
      .adr     (blk_adr[b]),
      .at      (at_i[b])
    );
  end

  lock_detect #(.NB(NB), .AW(AW)) u_lock (
    .at_i, .adr_i(blk_adr), .num_cb, .at, .which_b, .adr
  );

  main_ctrl #(.AW(AW)) u_ctrl (
    .clk, .sfreset(sfreset | reset),
    .sym_en(init_c), .sym_early(init_early),
    .wrap, .num_cb, .num_corr,
    .at, .which_b, .adr,
    .early, .late, .at_track,
    .guard, .num_sh, .n_consec,
    .mode, .lock, .maxadr, .pn_ph, .strobe_ph, .sh_win, .data_valid
  );

  data_correlator #(.NSLICE(NSLICE)) u_dcorr (
    .clk, .reset, .z, .maxadr, .spc,
    .pn_in(pn_bit[0]), .init_n(init_c), .init_early,
    .sleep(!lock), .q_e, .q_o, .q_l
  );

  data_recovery u_drec (
    .q_e, .q_o, .q_l, .thr_t(threshold_t),
    .early, .late, .at_track, .data_out, .data_bit
  );
endmodule
