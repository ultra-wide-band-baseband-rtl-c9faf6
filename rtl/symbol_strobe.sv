// symbol_strobe: symbol boundary clock.
//
// A free-running chip counter cycles through 0..wrap (a code of wrap+1
// chips). Relational logic compares it with strobe_ph: init_c is high on
// the chip where the counter equals strobe_ph (the first chip of a symbol,
// used to restart the correlators' accumulators) and init_early is high one
// chip earlier (the last chip of a symbol, used to enable the correlators'
// dump registers and to load the PN readout counters). Moving strobe_ph
// moves the symbol boundary without disturbing the counter; this is how the
// controller aligns symbols to chip PN0 after acquisition. Both strobes are
// combinational from the counter register. strobe_ph must not exceed wrap.
module symbol_strobe
  import uwb_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  phase_t wrap,
  input  phase_t strobe_ph,
  output phase_t chip_cnt,
  output logic   init_c,
  output logic   init_early
);
  phase_t early_ph;

  always_ff @(posedge clk) begin
    if (reset)                chip_cnt <= '0;
    else if (chip_cnt >= wrap) chip_cnt <= '0;
    else                      chip_cnt <= chip_cnt + 1'b1;
  end

  always_comb begin
    early_ph   = (strobe_ph == '0) ? wrap : strobe_ph - 1'b1;
    init_c     = (chip_cnt == strobe_ph);
    init_early = (chip_cnt == early_ph);
  end
endmodule
