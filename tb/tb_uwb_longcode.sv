// tb_uwb_longcode: end-to-end test of the baseband at default sizes with a maximal-length
// 1023-chip spreading code, the longest the PN register holds.
//
// A transmitter and front-end model in the testbench sends a 1023-chip
// maximal-length-sequence-coded
// BPSK pulse train: one pulse per chip, 8 samples long with a
// fixed +/- pattern, at offset D inside the sample window; the other
// samples are random bits (1-bit quantised noise) and 1 in 10 pulse
// samples is flipped. The matched filter is programmed with 7 x pattern.
// The front-end model moves D by num_sh whenever sh_win asks for a window
// shift (positions repeat every 16 samples, the pulse period).
//
// Script: noise only (the search sweeps all phases and shifts the window),
// then a preamble of ones until the receiver tracks, then random data
// bits, then a pulse drifting late by one sample every three symbols until
// the guard band shifts the window, then drifting early until the other
// guard fires, then the transmitter stops until the receiver falls back to
// acquisition. Checked: every recovered bit against the sent one and the
// symbol boundary alignment (data_valid exactly on PN0 of the next symbol);
// the locked slice against D; and that each mechanism happened at least
// once: acquisition window shift, lock, tracking, late step, early step,
// guard shift both ways, loss of track.
module tb_uwb_longcode;
  import uwb_pkg::*;
  localparam int NT = 128, NSL = 128, NB = 11, PM = 1024;
  localparam int NS = NT + NSL;
  localparam int N = 1023, L = 8, A = 7, PER = 16;
  localparam int NOISE_SYMS = 100;                 // symbols of noise before the preamble
  localparam logic [10:0] BARKER = 11'b01001000111;   // chip j = BARKER[j] when N = 11
  localparam logic [7:0]  PAT    = 8'b00001111;       // pulse sample j sign = PAT[j]

  logic clk = 0, reset = 1, sfreset = 1;
  logic [NS-1:0] s = '0;
  logic al = 0;
  coef_t c_in = '0;
  logic coef_en = 0, pn_in = 0, pn_en = 0;
  phase_t wrap = phase_t'(N - 1);
  logic [6:0] num_corr = 15, spc = 1, guard = 2, num_sh = 4;
  logic [3:0] num_cb = 11, n_consec = 2;
  corr_t threshold_s = 30000, threshold_t = 11000;
  bit code [N];
  corr_t data_out;
  logic data_bit, data_valid, lock;
  logic [1:0] sh_win;
  mode_t mode;
  logic [6:0] maxadr;

  uwb_baseband dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_acq_shift = 0, n_lock = 0, n_track = 0, n_late = 0, n_early = 0;
  int n_guard_delay = 0, n_guard_adv = 0, n_loss = 0, n_bits = 0;

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [NS-1:0] window(input bit present, input int d, input bit val);
    logic [NS-1:0] w;
    for (int j = 0; j < NS; j += 32) w[j +: 32] = $urandom;
    if (present)
      for (int j = 0; j < L; j++)
        if (($urandom % 10) != 0) w[d + j] = PAT[j] ~^ val;
    return w;
  endfunction

  initial begin
    int d, n, sym, phase, drift_t, data_cnt, last_sym_checked, rep_sym, g0;
    bit sent [int];
    bit present, val, bitv;
    mode_t prev_mode;
    logic [6:0] prev_maxadr;

    // the spreading code: Barker-11, or a maximal-length sequence from the
    // 10-bit recurrence a[j] = a[j-3] ^ a[j-10] (period 1023) otherwise
    if (N == 11) for (int j = 0; j < N; j++) code[j] = BARKER[j];
    else begin
      logic [9:0] r = 10'h001;
      for (int j = 0; j < N; j++) begin
        code[j] = r[0];
        r = {r[0] ^ r[3], r[9:1]};
      end
    end
    repeat (3) @(posedge clk);
    #1 reset = 0; sfreset = 0;
    // program the matched filter, last tap first
    for (int i = NT - 1; i >= 0; i--) begin
      coef_en = 1;
      c_in = (i < L) ? coef_t'(PAT[i] ? A : -A) : coef_t'(0);
      @(posedge clk); #1;
    end
    coef_en = 0;
    // program the PN code, last chip first
    for (int j = N - 1; j >= 0; j--) begin
      pn_en = 1; pn_in = code[j];
      @(posedge clk); #1;
    end
    pn_en = 0;
    sfreset = 1; @(posedge clk); #1 sfreset = 0;

    d = 5; g0 = 0; phase = 0; drift_t = 0; data_cnt = 0;
    prev_mode = mode; prev_maxadr = maxadr;
    for (n = 0; n < 600000; n++) begin
      sym = n / N;
      // ---- observe the receiver (state after the last clock edge)
      if (sh_win == SHW_DELAY) begin
        if (prev_mode == ST_ACQ) n_acq_shift++;
        else n_guard_delay++;
        d = (d - int'(num_sh) + PER) % PER;
      end
      if (sh_win == SHW_ADV) begin
        n_guard_adv++;
        d = (d + int'(num_sh)) % PER;
      end
      if (prev_mode == ST_ACQ && mode == ST_WAIT) begin
        n_lock++;
        chk(present, "lock only with a signal present");
        chk(int'(maxadr) == d || int'(maxadr) == d - 1 || int'(maxadr) == d + 1,
            $sformatf("locked slice %0d vs pulse offset %0d", maxadr, d));
      end
      if (prev_mode == ST_WAIT && mode == ST_TRACK) n_track++;
      if (prev_mode == ST_TRACK && mode == ST_ACQ) begin
        n_loss++;
        chk(phase == 4, "track lost only after the transmitter stopped");
      end
      if (mode == ST_TRACK && prev_mode == ST_TRACK) begin
        // a step may coincide with a guard shift of num_sh the other way
        case (sh_win)
          SHW_DELAY: if (int'(maxadr) == int'(prev_maxadr) + 1 - int'(num_sh)) n_late++;
          SHW_ADV:   if (int'(maxadr) == int'(prev_maxadr) - 1 + int'(num_sh)) n_early++;
          default: begin
            if (int'(maxadr) == int'(prev_maxadr) + 1) n_late++;
            if (int'(maxadr) == int'(prev_maxadr) - 1) n_early++;
          end
        endcase
      end
      if (data_valid) begin
        // chip n-2 was PN0 of the symbol after the reported one
        chk((n - 2) % N == 0, $sformatf("symbol boundary misaligned at chip %0d", n));
        rep_sym = (n - 2) / N - 1;
        if (sent.exists(rep_sym)) begin
          n_bits++;
          chk(data_bit == sent[rep_sym], $sformatf("bit of symbol %0d: got %0b sent %0b (out %0d)",
              rep_sym, data_bit, sent[rep_sym], data_out));
        end
      end
      prev_mode = mode; prev_maxadr = maxadr;

      // ---- script, advanced at symbol boundaries
      if (n % N == 0) begin
        case (phase)
          0: if (sym >= NOISE_SYMS) phase = 1;                               // noise only
          1: if (mode == ST_TRACK) phase = 2;                       // preamble
          2: begin data_cnt++; if (data_cnt >= 12) begin phase = 3; g0 = n_guard_delay; end end // data
          3: begin                                                  // drift late
               drift_t++;
               if (n_guard_delay > g0) begin phase = 5; drift_t = 0; g0 = n_guard_adv; end
               else if (drift_t % 3 == 0) d = (d + 1) % PER;
             end
          5: begin                                                  // drift early
               drift_t++;
               if (n_guard_adv > g0) begin phase = 4; end
               else if (drift_t % 3 == 0) d = (d + PER - 1) % PER;
             end
          4: if (mode == ST_ACQ) break;                             // silent
          default: ;
        endcase
        present = (phase != 0 && phase != 4);
        if (phase == 1) bitv = 1'b1;
        else bitv = $urandom;
        if (present) sent[sym] = bitv;
      end
      val = code[n % N] ~^ bitv;       // chip polarity x data polarity
      s = window(present, d, val);
      @(posedge clk); #1;
    end

    chk(n_acq_shift > 0, "acquisition window shift");
    chk(n_lock > 0, "lock");
    chk(n_track > 0, "tracking entered");
    chk(n_bits >= 12, $sformatf("bits recovered %0d", n_bits));
    chk(n_late > 0, "late step");
    chk(n_early > 0, "early step");
    chk(n_guard_delay > 0, "guard delay shift");
    chk(n_guard_adv > 0, "guard advance shift");
    chk(n_loss > 0, "loss of track");
    $display("mechanisms: acq_shift=%0d lock=%0d track=%0d bits=%0d late=%0d early=%0d guard+=%0d guard-=%0d loss=%0d",
             n_acq_shift, n_lock, n_track, n_bits, n_late, n_early, n_guard_delay, n_guard_adv, n_loss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
