// uwb_pkg: widths and shared types of the impulse-UWB baseband.
//
// The baseband takes a window of 1-bit samples once per chip (pulse
// repetition period), filters it with a bank of pulse matched filters,
// correlates every filter output with a stored PN code and detects the
// correlation peak. Widths below follow the design: 5-bit filter taps,
// 12-bit matched-filter outputs, 22-bit correlator outputs, PN codes of up
// to 1024 chips (10-bit chip counters), 128 slices (7-bit slice addresses).
// The state encoding of the main controller is this design's own.
package uwb_pkg;
  localparam int unsigned CW   = 5;   // PMF coefficient width
  localparam int unsigned ZW   = 12;  // PMF output width
  localparam int unsigned QW   = 22;  // correlator output width
  localparam int unsigned PHW  = 10;  // PN chip counter width (1024 chips)
  localparam int unsigned ADRW = 7;   // slice address width (128 slices)
  localparam int unsigned CBW  = 4;   // correlation block count/index width

  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [ZW-1:0] pmf_t;
  typedef logic signed [QW-1:0] corr_t;
  typedef logic [PHW-1:0]       phase_t;
  typedef logic [ADRW-1:0]      adr_t;

  // Main controller operating modes.
  typedef enum logic [1:0] {
    ST_ACQ   = 2'd0,  // serial/hybrid search over PN phases
    ST_WAIT  = 2'd1,  // wait_transition: symbol clock realigned
    ST_TRACK = 2'd2   // code tracking and data recovery
  } mode_t;

  // sh_win encoding: two's complement +1 / -1 / 0.
  localparam logic [1:0] SHW_NONE  = 2'b00;
  localparam logic [1:0] SHW_DELAY = 2'b01;   // +1: delay the window
  localparam logic [1:0] SHW_ADV   = 2'b11;   // -1: advance the window
endpackage
