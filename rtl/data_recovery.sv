// data_recovery: early/late discrimination, loss-of-track test and hard
// decision.
//
// The early, on-time and late correlations of the last symbol are compared
// by magnitude, so data modulation does not disturb the comparison:
// early = |q_e| > |q_o| and late = |q_l| > |q_o| tell the controller which
// way the pulse drifts. at_track = |q_o| >= thr_t stays high while the
// on-time correlation is strong enough to stay locked. The detector output
// data_out is the largest-magnitude value of the three (on-time preferred
// on ties), and data_bit is its hard decision (1 for a positive
// correlation, i.e. the sign bit inverted). Combinational. The comparisons,
// at_track, max-of-three and sign detection follow the design; tie rules
// and the bit polarity are this design's choices.
module data_recovery
  import uwb_pkg::*;
(
  input  corr_t q_e,
  input  corr_t q_o,
  input  corr_t q_l,
  input  corr_t thr_t,
  output logic  early,
  output logic  late,
  output logic  at_track,
  output corr_t data_out,
  output logic  data_bit
);
  logic [QW:0] m_e, m_o, m_l;   // magnitudes, one bit wider

  function automatic logic [QW:0] mag(corr_t x);
    return x[QW-1] ? -{x[QW-1], x} : {1'b0, x};
  endfunction

  always_comb begin
    m_e      = mag(q_e);
    m_o      = mag(q_o);
    m_l      = mag(q_l);
    early    = m_e > m_o;
    late     = m_l > m_o;
    at_track = $signed(m_o) >= $signed({thr_t[QW-1], thr_t});
    if (m_e > m_o && m_e >= m_l)  data_out = q_e;
    else if (m_l > m_o)           data_out = q_l;
    else                          data_out = q_o;
    data_bit = ~data_out[QW-1];
  end
endmodule
