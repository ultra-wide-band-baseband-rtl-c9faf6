// tb_pmf_decoder: thermometer code while searching (slices 0..num_corr
// on) and exactly the on-time and +/-spc slices while tracking.
module tb_pmf_decoder;
  import uwb_pkg::*;
  localparam int NSL = 128;
  logic track;
  logic [6:0] num_corr, maxadr, spc;
  logic [NSL-1:0] g, ref_g;
  int checks = 0, failures = 0;

  pmf_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      track = $urandom; num_corr = 7'($urandom); maxadr = 7'($urandom); spc = 7'($urandom % 6);
      #1;
      for (int k = 0; k < NSL; k++)
        ref_g[k] = track ? (k == int'(maxadr) || k == int'(maxadr) - int'(spc) || k == int'(maxadr) + int'(spc))
                         : (k <= int'(num_corr));
      checks++;
      if (g !== ref_g) begin failures++; $display("track %0b nc %0d m %0d spc %0d", track, num_corr, maxadr, spc); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
