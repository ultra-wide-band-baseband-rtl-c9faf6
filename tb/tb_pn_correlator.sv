// tb_pn_correlator: checks one correlator against a reference sum.
// Symbols of random length are driven with random inputs and chips; on the
// first chip of each symbol q_out must equal sum(pn ? d : -d) over the
// previous symbol (dump one chip early, value ready on the first chip).
// Sleep (lock) must freeze both the output and the running sum.
module tb_pn_correlator;
  import uwb_pkg::*;
  logic clk = 0, reset = 1;
  pmf_t d_in = '0;
  logic pn_in = 0, init_n = 0, init_early = 0, lock = 0;
  corr_t q_out;
  int checks = 0, failures = 0;
  int exp_prev = 0;

  pn_correlator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum, n;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int sym = 0; sym < 60; sym++) begin
      n = 2 + ($urandom % 40);
      exp_sum = 0;
      for (int c = 0; c < n; c++) begin
        d_in = pmf_t'($urandom); pn_in = $urandom;
        init_n = (c == 0); init_early = (c == n - 1);
        if (c == 0 && sym > 0) begin
          checks++;
          if (q_out !== corr_t'(exp_prev)) begin
            failures++; $display("sym %0d got %0d exp %0d", sym, q_out, exp_prev);
          end
        end
        exp_sum += pn_in ? int'(d_in) : -int'(d_in);
        // sleep for a few cycles in the middle of some symbols
        if (sym % 7 == 3 && c == 1) begin
          @(posedge clk); #1;
          lock = 1; d_in = pmf_t'($urandom); init_n = 0; init_early = 1;
          repeat (4) @(posedge clk); #1;
          lock = 0;
          continue;
        end
        @(posedge clk); #1;
      end
      exp_prev = exp_sum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
