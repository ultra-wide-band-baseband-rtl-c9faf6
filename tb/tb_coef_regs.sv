// tb_coef_regs: checks the coefficient shift chain. Shifts NTAPS random
// words in with coef_en, checks every tap position (first word in ends in
// the last tap), checks that taps hold with coef_en low and that reset
// clears them.
module tb_coef_regs;
  import uwb_pkg::*;
  localparam int NT = 8;
  logic clk = 0, reset = 1, coef_en = 0;
  coef_t c_in = '0;
  coef_t coef [NT];
  coef_t ref_w [NT];
  int checks = 0, failures = 0;

  coef_regs #(.NTAPS(NT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int rep = 0; rep < 5; rep++) begin
      for (int k = 0; k < NT; k++) begin
        ref_w[k] = coef_t'($urandom);
        c_in = ref_w[k]; coef_en = 1;
        @(posedge clk); #1;
      end
      coef_en = 0; c_in = coef_t'($urandom);
      repeat (3) @(posedge clk); #1;
      for (int k = 0; k < NT; k++) begin
        checks++;
        if (coef[NT-1-k] !== ref_w[k]) begin
          failures++;
          $display("tap %0d: got %0d exp %0d", NT-1-k, coef[NT-1-k], ref_w[k]);
        end
      end
    end
    reset = 1; @(posedge clk); #1 reset = 0;
    for (int k = 0; k < NT; k++) begin
      checks++; if (coef[k] !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
