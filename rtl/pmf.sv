// pmf: pulse matched filter bank.
//
// NSLICE parallel FIR slices, each of NTAPS taps, slide over one window of
// 1-bit samples: slice k forms
//     z[k] = sum_i  coef[i] * (w[k+i] ? +1 : -1)
// so each output is the matched-filter value for one sample offset of the
// pulse inside the window. A 1-bit sample turns the multiply into a
// conditional negation of the 5-bit tap, and the NTAPS partial products of a
// slice are summed by an adder tree with no internal rounding (12-bit result
// for 128 taps of 5 bits).
//
// Slice gating: g[k] = 0 replaces the taps of slice k by zero, so the slice
// (and the correlators that follow it) sees a constant 0.
//
// Always-on mode (al = 1): the ADC then delivers one repetition period of
// NSLICE samples per chip on s[0 +: NSLICE]. A register keeps the previous
// chip's NTAPS samples, and the filter window becomes {previous, current},
// so pulses spanning a chip boundary are still captured. With al = 0 the
// window is simply s.
//
// Timing: outputs are combinational from s, coef and g (no pipelining); the
// always-on history register is written on every clock while al is high.
// Slice k reads samples k .. k+NTAPS-1, so the top sample of the 256-wide
// window is not used by any slice (128 slices of 128 taps need 255). The
// slice structure, widths, gating and the always-on idea follow the design;
// the window arrangement in always-on mode is this implementation's choice.
module pmf
  import uwb_pkg::*;
#(
  parameter int unsigned NTAPS  = 128,
  parameter int unsigned NSLICE = 128,
  parameter int unsigned NS     = NTAPS + NSLICE
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [NS-1:0]    s,
  input  coef_t            coef [NTAPS],
  input  logic [NSLICE-1:0] g,
  input  logic             al,
  output pmf_t             z [NSLICE]
);
  logic [NTAPS-1:0] hist;   // previous chip's samples (always-on mode)
  logic [NS-1:0]    w;      // filter window

  always_ff @(posedge clk) begin
    if (reset)   hist <= '0;
    else if (al) hist <= s[NTAPS-1:0];
  end

  always_comb begin
    if (al) w = {s[NSLICE-1:0], hist};
    else    w = s;
  end

  // one adder tree per slice
  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    always_comb begin
      int acc;
      acc = 0;
      for (int i = 0; i < NTAPS; i++) begin
        if (w[k+i]) acc = acc + int'(coef[i]);
        else        acc = acc - int'(coef[i]);
      end
      z[k] = g[k] ? pmf_t'(acc) : pmf_t'(0);
    end
  end
endmodule
