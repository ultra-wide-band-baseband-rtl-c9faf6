// tb_correlation_block: four correlators sharing one PN stream. Random PMF
// outputs and chips over several symbols; each q[k] must equal the
// reference correlation of its own input over the previous symbol, and the
// lock input must freeze all outputs.
module tb_correlation_block;
  import uwb_pkg::*;
  localparam int NSL = 4, N = 11;
  logic clk = 0, reset = 1, pn_in = 0, init_n = 0, init_early = 0, lock = 0;
  pmf_t z [NSL];
  corr_t q [NSL];
  int acc [NSL], prev [NSL];
  int checks = 0, failures = 0;

  correlation_block #(.NSLICE(NSL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NSL; k++) z[k] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int sym = 0; sym < 20; sym++) begin
      for (int k = 0; k < NSL; k++) acc[k] = 0;
      for (int c = 0; c < N; c++) begin
        pn_in = $urandom; init_n = (c == 0); init_early = (c == N - 1);
        for (int k = 0; k < NSL; k++) begin
          z[k] = pmf_t'($urandom);
          acc[k] += pn_in ? int'(z[k]) : -int'(z[k]);
        end
        if (c == 0 && sym > 0)
          for (int k = 0; k < NSL; k++) begin
            checks++;
            if (q[k] !== corr_t'(prev[k])) begin
              failures++; $display("sym %0d k %0d got %0d exp %0d", sym, k, q[k], prev[k]);
            end
          end
        @(posedge clk); #1;
      end
      prev = acc;
    end
    // sleep: outputs hold whatever is driven
    lock = 1;
    repeat (2 * N) begin
      init_early = 1; init_n = 1;
      for (int k = 0; k < NSL; k++) z[k] = pmf_t'($urandom);
      @(posedge clk); #1;
    end
    for (int k = 0; k < NSL; k++) begin
      checks++; if (q[k] !== corr_t'(prev[k])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
