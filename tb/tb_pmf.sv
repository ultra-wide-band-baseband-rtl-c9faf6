// tb_pmf: checks the pulse matched filter at its full size (128 taps x 128
// slices). Random coefficients, samples and slice enables are applied and
// every output is compared with a direct evaluation of
// z[k] = sum_i c[i] * (+1 if w[k+i] else -1), truncated to 12 bits, zero
// for disabled slices. Always-on mode is checked too: after one clock with
// al high the window must be {current low samples, previous low samples}.
module tb_pmf;
  import uwb_pkg::*;
  localparam int NT = 128, NSL = 128, NS = NT + NSL;
  logic clk = 0, reset = 1, al = 0;
  logic [NS-1:0] s;
  coef_t coef [NT];
  logic [NSL-1:0] g;
  pmf_t z [NSL];
  logic [NS-1:0] w;
  logic [NT-1:0] prev;
  int checks = 0, failures = 0;

  pmf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input logic [NS-1:0] win);
    for (int k = 0; k < NSL; k++) begin
      int acc = 0;
      if (g[k]) for (int i = 0; i < NT; i++) acc += win[k+i] ? int'(coef[i]) : -int'(coef[i]);
      checks++;
      if (z[k] !== pmf_t'(acc)) begin
        failures++;
        if (failures < 10) $display("slice %0d: got %0d exp %0d", k, z[k], acc);
      end
    end
  endtask

  function automatic logic [NS-1:0] rnd_s();
    logic [NS-1:0] v;
    for (int j = 0; j < NS; j += 32) v[j +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    s = '0; g = '1;
    for (int i = 0; i < NT; i++) coef[i] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < NT; i++) coef[i] = coef_t'($urandom);
      if (t == 0) for (int i = 0; i < NT; i++) coef[i] = -5'sd16;  // extreme taps
      s = rnd_s();
      if (t < 3) g = '1;
      else begin g[31:0] = $urandom; g[63:32] = $urandom; g[95:64] = $urandom; g[127:96] = $urandom; end
      #1 check_all(s);
      @(posedge clk); #1;
    end
    // always-on mode
    g = '1;
    s = rnd_s(); al = 1;
    prev = s[NT-1:0];
    @(posedge clk); #1;
    for (int t = 0; t < 10; t++) begin
      s = rnd_s();
      #1;
      w = {s[NSL-1:0], prev};
      check_all(w);
      prev = s[NT-1:0];
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
