// tb_lock_detect: random block flags and addresses; at must be the OR of
// the flags of blocks below num_cb, which_b the lowest such block and adr
// its address.
module tb_lock_detect;
  import uwb_pkg::*;
  localparam int NB = 11;
  logic [NB-1:0] at_i;
  logic [6:0] adr_i [NB];
  logic [3:0] num_cb, which_b;
  logic at;
  logic [6:0] adr;
  int checks = 0, failures = 0;

  lock_detect dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wb;
    for (int t = 0; t < 500; t++) begin
      at_i = NB'($urandom);
      if (t % 4 == 0) at_i = NB'(1 << ($urandom % NB));
      if (t % 9 == 0) at_i = '0;
      num_cb = 4'($urandom % 12);
      for (int b = 0; b < NB; b++) adr_i[b] = 7'($urandom);
      #1;
      wb = -1;
      for (int b = NB - 1; b >= 0; b--) if (at_i[b] && b < int'(num_cb)) wb = b;
      checks++;
      if (at !== (wb >= 0)) begin failures++; $display("at %0b exp %0d", at, wb); end
      if (wb >= 0) begin
        checks += 2;
        if (int'(which_b) != wb) begin failures++; $display("which %0d exp %0d", which_b, wb); end
        if (adr !== adr_i[wb]) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
