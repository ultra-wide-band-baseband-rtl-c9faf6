// tb_peak_detector: 128 random correlation values (including planted ties
// and negative-only sets) against a reference arg-max that prefers the
// lowest index on ties; checks max value, address and the threshold flag.
module tb_peak_detector;
  import uwb_pkg::*;
  localparam int NSL = 128;
  corr_t q [NSL];
  corr_t thr, max_val;
  logic [6:0] adr;
  logic at;
  int checks = 0, failures = 0;

  peak_detector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, bi;
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < NSL; k++) begin
        q[k] = corr_t'($urandom);
        if (t % 3 == 1) q[k] = corr_t'(int'($urandom % 200) - 100);
        if (t % 3 == 2) q[k] = corr_t'(-1 - int'($urandom % 5000));
      end
      if (t % 5 == 0) begin
        // plant a tie for the maximum
        int a = $urandom % NSL, b = $urandom % NSL;
        q[a] = corr_t'(22'sh1FFFF0); q[b] = corr_t'(22'sh1FFFF0);
      end
      thr = corr_t'(int'($urandom % 400) - 200);
      #1;
      best = int'(q[0]); bi = 0;
      for (int k = 1; k < NSL; k++) if (int'(q[k]) > best) begin best = int'(q[k]); bi = k; end
      checks += 3;
      if (int'(max_val) != best) begin failures++; $display("max %0d exp %0d", max_val, best); end
      if (int'(adr) != bi) begin failures++; $display("adr %0d exp %0d", adr, bi); end
      if (at !== (best > int'(thr))) begin failures++; $display("at wrong"); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
