// tb_symbol_strobe: checks that init_c fires exactly once every wrap+1
// chips, when the free-running counter equals strobe_ph, and init_early
// exactly one chip before it; also that moving strobe_ph moves the boundary
// (the next init_c comes when the counter reaches the new value).
module tb_symbol_strobe;
  import uwb_pkg::*;
  logic clk = 0, reset = 1;
  phase_t wrap, strobe_ph, chip_cnt;
  logic init_c, init_early;
  int checks = 0, failures = 0;
  int model_cnt;

  symbol_strobe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_init, last_early, n_init;
    wrap = 10; strobe_ph = 0; model_cnt = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int cfg = 0; cfg < 8; cfg++) begin
      wrap = phase_t'(cfg == 0 ? 1023 : 2 + $urandom % 40);
      strobe_ph = phase_t'($urandom % (int'(wrap) + 1));
      // let the counter come back into range
      repeat (1100) @(posedge clk);
      #1;
      last_init = -1; last_early = -1; n_init = 0;
      for (int t = 0; t < 3 * (int'(wrap) + 1); t++) begin
        checks++;
        if (init_c !== (chip_cnt == strobe_ph)) failures++;
        if (init_early) last_early = t;
        if (init_c) begin
          checks++;
          if (last_init >= 0 && t - last_init != int'(wrap) + 1) begin
            failures++; $display("period %0d wrap %0d", t - last_init, wrap);
          end
          checks++;
          if (last_early != t - 1 && t > 0) begin
            failures++; $display("early at %0d init at %0d", last_early, t);
          end
          last_init = t; n_init++;
        end
        @(posedge clk); #1;
      end
      checks++;
      if (n_init < 2) begin failures++; $display("too few strobes %0d", n_init); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
