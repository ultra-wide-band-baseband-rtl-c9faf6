// tb_pn_readout: runs the readout counters against a reference model over
// random wrap values, start phases and load strobes, searching and locked.
// Reference: on load, counter r takes pn_ph + r (0 if beyond wrap); else it
// counts up and returns to 0 after wrap; when locked, counters above 0
// stay 0.
module tb_pn_readout;
  import uwb_pkg::*;
  localparam int NR = 4;
  logic clk = 0, sfreset = 1, sym_load = 0, lock = 0;
  phase_t wrap, pn_ph;
  phase_t pnread [NR];
  int ref_c [NR];
  int checks = 0, failures = 0;

  pn_readout #(.NR(NR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wrap = 10; pn_ph = 0;
    for (int r = 0; r < NR; r++) ref_c[r] = 0;
    repeat (2) @(posedge clk);
    #1 sfreset = 0;
    for (int t = 0; t < 3000; t++) begin
      if (t % 500 == 0) wrap = phase_t'(3 + $urandom % 30);
      sym_load = ($urandom % 7) == 0;
      pn_ph = phase_t'($urandom % (int'(wrap) + 3));
      lock = (t / 700) % 2 == 1;
      for (int r = 0; r < NR; r++) begin
        if (lock && r != 0) ref_c[r] = 0;
        else if (sym_load) ref_c[r] = (int'(pn_ph) + r > int'(wrap)) ? 0 : int'(pn_ph) + r;
        else ref_c[r] = (ref_c[r] >= int'(wrap)) ? 0 : ref_c[r] + 1;
      end
      @(posedge clk); #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (int'(pnread[r]) != ref_c[r]) begin
          failures++;
          if (failures < 10) $display("t %0d r %0d got %0d exp %0d", t, r, pnread[r], ref_c[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
