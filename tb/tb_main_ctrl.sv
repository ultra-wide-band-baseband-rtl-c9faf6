// tb_main_ctrl: scripted walk through all controller modes with an
// 11-chip code (wrap = 10) and 3 correlation blocks. A free-running chip
// counter in the testbench makes sym_en/sym_early from the controller's own
// strobe_ph, as the symbol strobe generator does. Checked: the phase
// stepping by num_cb with the sh_win pulse at the end of a sweep; that the
// first symbol after reset is not evaluated; the symbol-boundary shift
// (chips - matched phase) and maxadr latch on lock; the two-symbol wait;
// early/late steering after n_consec symbols; guard-triggered sh_win in
// both directions with the num_sh correction; data_valid; and the return
// to acquisition when at_track drops.
module tb_main_ctrl;
  import uwb_pkg::*;
  localparam int N = 11;
  logic clk = 0, sfreset = 1;
  logic sym_en, sym_early;
  phase_t wrap = 10;
  logic [3:0] num_cb = 3, which_b = 0, n_consec = 2;
  logic [6:0] num_corr = 60, adr = 0, guard = 3, num_sh = 5;
  logic at = 0, early = 0, late = 0, at_track = 1;
  mode_t mode;
  logic lock, data_valid;
  logic [6:0] maxadr;
  phase_t pn_ph, strobe_ph;
  logic [1:0] sh_win;
  int cnt = 0;
  int checks = 0, failures = 0;
  int n_shw_delay = 0, n_shw_adv = 0, n_valid = 0;

  main_ctrl dut (.*);
  always #5 clk = ~clk;

  always_comb begin
    sym_en    = (cnt == int'(strobe_ph));
    sym_early = (cnt == (strobe_ph == 0 ? N - 1 : int'(strobe_ph) - 1));
  end
  always_ff @(posedge clk) begin
    cnt <= (cnt == N - 1) ? 0 : cnt + 1;
    if (sh_win == SHW_DELAY) n_shw_delay <= n_shw_delay + 1;
    if (sh_win == SHW_ADV)   n_shw_adv   <= n_shw_adv + 1;
    if (data_valid)          n_valid     <= n_valid + 1;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // advance to just after the next clock edge on which sym_en was high
  task automatic to_sym();
    while (!sym_en) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  initial begin
    int ph_seen [$];
    int old_strobe, p, exp_strobe, m;
    repeat (3) @(posedge clk);
    #1 sfreset = 0;
    // --- acquisition: phase sweep 0,3,6,9 then wrap with sh_win
    at = 1; which_b = 1; adr = 20;          // at high on the first (stale) symbol
    to_sym();
    chk(mode == ST_ACQ, "first symbol after reset must be skipped");
    at = 0;
    for (int d = 0; d < 9; d++) begin
      @(posedge clk); #1;
      while (!(sym_early)) begin @(posedge clk); #1; end
      ph_seen.push_back(int'(pn_ph));
      @(posedge clk); #1;
    end
    chk(ph_seen[0] == 3 && ph_seen[1] == 6 && ph_seen[2] == 9 && ph_seen[3] == 0 && ph_seen[4] == 3,
        $sformatf("phase sequence %p", ph_seen));
    chk(n_shw_delay == 2, "sh_win +1 once per sweep");
    // phase loaded at the last sym_early was ph_seen[8]; it becomes ph_done
    // at the next sym_early, when the dwell that used it ends
    while (!sym_early) begin @(posedge clk); #1; end
    // this sym_early ends the dwell searched with ph_seen[8]
    @(posedge clk); #1;             // now sym_en cycle: evaluate
    chk(sym_en, "sym_en follows sym_early");
    at = 1; which_b = 2; adr = 37;
    old_strobe = int'(strobe_ph);
    p = ph_seen[8] + 2; if (p > 10) p = 0;
    exp_strobe = (old_strobe + N - p) % N;
    @(posedge clk); #1;
    at = 0;
    chk(mode == ST_WAIT && lock, "enter wait_transition on detection");
    chk(int'(strobe_ph) == exp_strobe, $sformatf("strobe_ph %0d exp %0d (p=%0d)", strobe_ph, exp_strobe, p));
    chk(maxadr == 37, "maxadr latched from peak address");
    chk(pn_ph == 0, "readout 0 restarts at PN0");
    // --- wait two symbol strobes
    to_sym();
    chk(mode == ST_WAIT, "still waiting after first strobe");
    to_sym();
    chk(mode == ST_TRACK, "tracking after second strobe");
    // --- late for n_consec=2 symbols -> maxadr + 1
    late = 1;
    to_sym(); chk(maxadr == 37 && data_valid, $sformatf("no move after one late symbol %0d %0b", maxadr, data_valid));
    to_sym(); chk(maxadr == 38, "maxadr+1 after two late symbols");
    late = 0; early = 1;
    to_sym(); to_sym(); chk(maxadr == 37, "maxadr-1 after two early symbols");
    early = 1; late = 1;
    to_sym(); to_sym(); chk(maxadr == 37, "no move when early and late both set");
    // --- drive late up to the guard band near num_corr
    early = 0; late = 1;
    num_corr = 40;
    do to_sym(); while (sh_win != SHW_DELAY);
    chk(maxadr == 38 - 5, $sformatf("guard: maxadr %0d exp 33", maxadr));
    late = 0; early = 1;
    do to_sym(); while (sh_win != SHW_ADV);
    chk(maxadr == 2 + 5, $sformatf("guard low: maxadr %0d exp 7", maxadr));
    chk(n_valid > 10, "data_valid pulses in tracking");
    // --- lose track
    early = 0; at_track = 0;
    to_sym();
    chk(mode == ST_ACQ && !lock, "back to acquisition when at_track drops");
    at_track = 1; at = 1;
    to_sym();
    chk(mode == ST_ACQ, "first symbol after re-entering acquisition is skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
