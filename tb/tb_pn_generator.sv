// tb_pn_generator: loads random codes of several lengths through the shift
// chain (last chip first) and reads them back through three readout
// addresses at random; chip j of the code must appear for address j.
module tb_pn_generator;
  import uwb_pkg::*;
  localparam int PM = 64, NR = 3;
  logic clk = 0, reset = 1, pn_en = 0, pn_in = 0;
  phase_t pnread [NR];
  logic [NR-1:0] pn_bit;
  logic code [PM];
  int checks = 0, failures = 0;

  pn_generator #(.PN_MAX(PM), .NR(NR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    for (int r = 0; r < NR; r++) pnread[r] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    foreach (len_list[li]) begin
      len = len_list[li];
      for (int j = 0; j < len; j++) code[j] = $urandom;
      for (int j = len - 1; j >= 0; j--) begin
        pn_en = 1; pn_in = code[j];
        @(posedge clk); #1;
      end
      pn_en = 0; pn_in = $urandom;
      for (int t = 0; t < 100; t++) begin
        for (int r = 0; r < NR; r++) pnread[r] = phase_t'($urandom % len);
        #1;
        for (int r = 0; r < NR; r++) begin
          checks++;
          if (pn_bit[r] !== code[pnread[r]]) begin
            failures++; $display("len %0d adr %0d got %0b", len, pnread[r], pn_bit[r]);
          end
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int len_list [3] = '{11, 13, 64};
endmodule
