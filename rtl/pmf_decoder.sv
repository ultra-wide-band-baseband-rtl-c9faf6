// pmf_decoder: PMF slice enable decoder (control vector g).
//
// While searching (track = 0) a thermometer code enables slices
// 0..num_corr (num_corr+1 slices, so the 7-bit field reaches all 128) and
// blocks the rest, which also silences the correlators behind them. While
// locked (track = 1) only the three slices used for tracking are enabled:
// on-time maxadr and its early/late neighbours maxadr-spc and maxadr+spc
// (a neighbour falling outside the slice range is simply not enabled).
// Combinational. Both decoding modes follow the design; the +1 offset of
// num_corr is this design's reading of its 7-bit width.
module pmf_decoder
  import uwb_pkg::*;
#(
  parameter int unsigned NSLICE = 128,
  parameter int unsigned AW     = $clog2(NSLICE)
) (
  input  logic              track,
  input  logic [AW-1:0]     num_corr,
  input  logic [AW-1:0]     maxadr,
  input  logic [AW-1:0]     spc,
  output logic [NSLICE-1:0] g
);
  always_comb begin
    int e, l;
    e = int'(maxadr) - int'(spc);
    l = int'(maxadr) + int'(spc);
    for (int k = 0; k < NSLICE; k++) begin
      if (track) g[k] = (k == int'(maxadr)) || (k == e) || (k == l);
      else       g[k] = (k <= int'(num_corr));
    end
  end
endmodule
