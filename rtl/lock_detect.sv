// lock_detect: combines the per-block synchronisation flags.
//
// The threshold flags at_i of the correlation blocks in use (index below
// num_cb) are ORed into at, the "signal found" input of the main
// controller. which_b encodes the block that fired (the lowest index if
// several did, the design assuming at most one does) and adr passes on that
// block's peak address, the on-time slice. Combinational. The OR gate and
// which_b follow the design; lowest-index priority and the address mux are
// this design's choices.
module lock_detect
  import uwb_pkg::*;
#(
  parameter int unsigned NB = 11,
  parameter int unsigned AW = ADRW
) (
  input  logic [NB-1:0]   at_i,
  input  logic [AW-1:0]   adr_i [NB],
  input  logic [CBW-1:0]  num_cb,
  output logic            at,
  output logic [CBW-1:0]  which_b,
  output logic [AW-1:0]   adr
);
  logic [NB-1:0] used;

  always_comb begin
    for (int b = 0; b < NB; b++) used[b] = at_i[b] && (b < int'(num_cb));
    at      = |used;
    which_b = '0;
    adr     = adr_i[0];
    for (int b = NB - 1; b >= 0; b--) begin
      if (used[b]) begin
        which_b = CBW'(b);
        adr     = adr_i[b];
      end
    end
  end
endmodule
