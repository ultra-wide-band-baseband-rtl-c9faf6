// tb_data_correlator: eight PMF outputs, random on-time address and
// spacing; the three outputs must be the correlations of slices
// maxadr-spc, maxadr and maxadr+spc (clamped to the slice range) over the
// previous symbol.
module tb_data_correlator;
  import uwb_pkg::*;
  localparam int NSL = 8, N = 7;
  logic clk = 0, reset = 1, pn_in = 0, init_n = 0, init_early = 0, sleep = 0;
  pmf_t z [NSL];
  logic [2:0] maxadr, spc;
  corr_t q_e, q_o, q_l;
  int acc [3], prev [3];
  int checks = 0, failures = 0;

  data_correlator #(.NSLICE(NSL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ie, il;
    for (int k = 0; k < NSL; k++) z[k] = '0;
    maxadr = 3; spc = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int sym = 0; sym < 40; sym++) begin
      maxadr = 3'($urandom); spc = 3'($urandom % 3);
      ie = int'(maxadr) - int'(spc); if (ie < 0) ie = 0;
      il = int'(maxadr) + int'(spc); if (il > NSL - 1) il = NSL - 1;
      acc = '{0, 0, 0};
      for (int c = 0; c < N; c++) begin
        pn_in = $urandom; init_n = (c == 0); init_early = (c == N - 1);
        for (int k = 0; k < NSL; k++) z[k] = pmf_t'($urandom);
        acc[0] += pn_in ? int'(z[ie]) : -int'(z[ie]);
        acc[1] += pn_in ? int'(z[maxadr]) : -int'(z[maxadr]);
        acc[2] += pn_in ? int'(z[il]) : -int'(z[il]);
        if (c == 0 && sym > 0) begin
          checks += 3;
          if (int'(q_e) != prev[0]) begin failures++; $display("early %0d exp %0d", q_e, prev[0]); end
          if (int'(q_o) != prev[1]) begin failures++; $display("on %0d exp %0d", q_o, prev[1]); end
          if (int'(q_l) != prev[2]) begin failures++; $display("late %0d exp %0d", q_l, prev[2]); end
        end
        @(posedge clk); #1;
      end
      prev = acc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
