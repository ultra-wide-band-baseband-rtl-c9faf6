// tb_data_recovery: random early/on-time/late correlations (both signs,
// planted ties) against a reference for early, late, at_track, the
// largest-magnitude output and its hard decision.
module tb_data_recovery;
  import uwb_pkg::*;
  corr_t q_e, q_o, q_l, thr_t, data_out;
  logic early, late, at_track, data_bit;
  int checks = 0, failures = 0;

  data_recovery dut (.*);

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, o, l, exp_d;
    for (int t = 0; t < 2000; t++) begin
      e = int'($urandom % 4001) - 2000; o = int'($urandom % 4001) - 2000; l = int'($urandom % 4001) - 2000;
      if (t % 5 == 0) e = -o;
      if (t % 7 == 0) l = o;
      q_e = corr_t'(e); q_o = corr_t'(o); q_l = corr_t'(l);
      thr_t = corr_t'($urandom % 2000);
      #1;
      if (iabs(e) > iabs(o) && iabs(e) >= iabs(l)) exp_d = e;
      else if (iabs(l) > iabs(o)) exp_d = l;
      else exp_d = o;
      checks += 5;
      if (early !== (iabs(e) > iabs(o))) failures++;
      if (late !== (iabs(l) > iabs(o))) failures++;
      if (at_track !== (iabs(o) >= int'(thr_t))) failures++;
      if (int'(data_out) != exp_d) begin failures++; $display("e %0d o %0d l %0d got %0d", e, o, l, data_out); end
      if (data_bit !== (exp_d >= 0)) failures++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
