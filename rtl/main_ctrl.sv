// main_ctrl: operating-mode controller of the baseband (Main_Cntrl).
//
// Three modes, changed only on the symbol strobe sym_en (first chip of a
// symbol, when the correlators show the finished symbol's results):
//
// ST_ACQ (acquisition). The correlation blocks search num_cb code phases
//   per symbol (block b tests phase pn_ph + b) over all window offsets.
//   On every sym_early (last chip of a symbol) the readout counters load
//   the current pn_ph and pn_ph advances by num_cb, returning to 0 when it
//   passes the last phase. On sym_en the phase searched in the finished
//   symbol, ph_done, is known. If nothing was found and that symbol closed
//   a sweep of all phases, sh_win pulses +1 for one chip, asking the front
//   end to delay the sampling window to the next position (the symbol
//   already started then loses its first chip or two to the old window).
//   If the combined flag at is high, block which_b matched phase p = ph_done +
//   which_b (0 if past wrap). The controller then latches maxadr = adr, the
//   on-time slice, and moves the symbol boundary by (chips - p) chips so
//   that symbols start at chip PN0, and enters ST_WAIT. The first symbol
//   after entering ST_ACQ is not evaluated (its correlations are stale).
// ST_WAIT (wait_transition). The data correlators need a full symbol at the
//   new boundary; after the second sym_en the mode becomes ST_TRACK.
// ST_TRACK (tracking). On each sym_en with at_track high, data_valid pulses
//   and early/late steer maxadr: after n_consec consecutive symbols with
//   late (early) set, maxadr moves one slice later (earlier). If maxadr then
//   lies within guard slices of either end of the active window
//   (0..num_corr), sh_win pulses +1 (near the late end, window delayed) or
//   -1 (near the early end, window advanced) and maxadr moves by num_sh the
//   opposite way, following the pulse. at_track low returns to ST_ACQ.
//
// lock = (mode != ST_ACQ) puts the correlation blocks to sleep and switches
// the readouts and slice decoder to tracking. Code length is wrap+1 chips.
// The modes, the phase search, the strobe-phase rule, the consecutive-N
// early/late filter, Guard and num_sh follow the design; the phase step of
// num_cb per symbol, the skipped first symbol, the two-strobe wait and the
// sh_win encoding (01 = +1, 11 = -1) are this design's choices. sfreset
// resets the controller (synchronous, active high).
module main_ctrl
  import uwb_pkg::*;
#(
  parameter int unsigned AW = ADRW
) (
  input  logic           clk,
  input  logic           sfreset,
  input  logic           sym_en,
  input  logic           sym_early,
  input  phase_t         wrap,
  input  logic [CBW-1:0] num_cb,
  input  logic [AW-1:0]  num_corr,
  input  logic           at,
  input  logic [CBW-1:0] which_b,
  input  logic [AW-1:0]  adr,
  input  logic           early,
  input  logic           late,
  input  logic           at_track,
  input  logic [AW-1:0]  guard,
  input  logic [AW-1:0]  num_sh,
  input  logic [3:0]     n_consec,
  output mode_t          mode,
  output logic           lock,
  output logic [AW-1:0]  maxadr,
  output phase_t         pn_ph,
  output phase_t         strobe_ph,
  output logic [1:0]     sh_win,
  output logic           data_valid
);
  phase_t     ph_run, ph_done;
  logic       skip;
  logic       wait_cnt;
  logic [3:0] cnt_e, cnt_l;

  assign lock = (mode != ST_ACQ);

  always_ff @(posedge clk) begin
    if (sfreset) begin
      mode       <= ST_ACQ;
      maxadr     <= '0;
      pn_ph      <= '0;
      strobe_ph  <= '0;
      ph_run     <= '0;
      ph_done    <= '0;
      skip       <= 1'b1;
      wait_cnt   <= 1'b0;
      cnt_e      <= '0;
      cnt_l      <= '0;
      sh_win     <= SHW_NONE;
      data_valid <= 1'b0;
    end else begin
      sh_win     <= SHW_NONE;
      data_valid <= 1'b0;
      unique case (mode)
        ST_ACQ: begin
          if (sym_early) begin
            logic [PHW:0] nxt;
            ph_run  <= pn_ph;
            ph_done <= ph_run;
            nxt = {1'b0, pn_ph} + (PHW+1)'(num_cb);
            if (nxt > {1'b0, wrap}) begin
              pn_ph  <= '0;
            end else begin
              pn_ph <= nxt[PHW-1:0];
            end
          end
          if (sym_en) begin
            if (skip) begin
              skip <= 1'b0;
            end else if (!at) begin
              // the finished symbol closed a sweep of all phases: move on
              if ({1'b0, ph_done} + (PHW+1)'(num_cb) > {1'b0, wrap})
                sh_win <= SHW_DELAY;
            end else begin
              logic [PHW:0] p, s;
              p = {1'b0, ph_done} + (PHW+1)'(which_b);
              if (p > {1'b0, wrap}) p = '0;
              s = {1'b0, strobe_ph} + {1'b0, wrap} + 1'b1 - p;
              if (s > {1'b0, wrap}) s = s - ({1'b0, wrap} + 1'b1);
              strobe_ph <= s[PHW-1:0];
              maxadr    <= adr;
              pn_ph     <= '0;
              wait_cnt  <= 1'b0;
              cnt_e     <= '0;
              cnt_l     <= '0;
              mode      <= ST_WAIT;
            end
          end
        end
        ST_WAIT: begin
          if (sym_en) begin
            if (wait_cnt) mode <= ST_TRACK;
            wait_cnt <= 1'b1;
          end
        end
        ST_TRACK: begin
          if (sym_en) begin
            if (!at_track) begin
              mode  <= ST_ACQ;
              skip  <= 1'b1;
              pn_ph <= '0;
            end else begin
              int m;
              int lim;
              m   = int'(maxadr);
              lim = int'(num_corr);
              data_valid <= 1'b1;
              if (late && !early) begin
                cnt_e <= '0;
                if (int'(cnt_l) + 1 >= int'(n_consec)) begin
                  cnt_l <= '0;
                  if (m < lim) m = m + 1;
                end else begin
                  cnt_l <= cnt_l + 1'b1;
                end
              end else if (early && !late) begin
                cnt_l <= '0;
                if (int'(cnt_e) + 1 >= int'(n_consec)) begin
                  cnt_e <= '0;
                  if (m > 0) m = m - 1;
                end else begin
                  cnt_e <= cnt_e + 1'b1;
                end
              end else begin
                cnt_e <= '0;
                cnt_l <= '0;
              end
              if (m + int'(guard) > lim) begin
                sh_win <= SHW_DELAY;
                m = m - int'(num_sh);
                if (m < 0) m = 0;
              end else if (m < int'(guard)) begin
                sh_win <= SHW_ADV;
                m = m + int'(num_sh);
                if (m > lim) m = lim;
              end
              maxadr <= AW'(m);
            end
          end
        end
        default: mode <= ST_ACQ;
      endcase
    end
  end
endmodule
