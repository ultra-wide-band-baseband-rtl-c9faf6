// peak_detector: maximum search and synchronisation threshold for one
// correlation block.
//
// A binary tree of max cells reduces the NSLICE correlation values to their
// maximum. Each cell passes the larger of its two inputs and a select bit
// that is 0 when the first (lower-index) input wins, ties included, and 1
// when the second wins. Concatenating the select bits of the winning path,
// from the first tree level (LSB) to the last (MSB), gives the address of
// the maximum directly. The maximum is then compared with the programmable
// threshold: at = (max > thr), signed. Purely combinational.
// The tree, the address-from-select-bits scheme and the comparator follow
// the design; the select-bit polarity and the strict compare are choices.
module peak_detector
  import uwb_pkg::*;
#(
  parameter int unsigned NSLICE = 128,
  parameter int unsigned AW     = $clog2(NSLICE)
) (
  input  corr_t          q [NSLICE],
  input  corr_t          thr,
  output corr_t          max_val,
  output logic [AW-1:0]  adr,
  output logic           at
);
  corr_t          v [NSLICE];
  logic [AW-1:0]  a [NSLICE];

  always_comb begin
    int n;
    for (int k = 0; k < NSLICE; k++) begin
      v[k] = q[k];
      a[k] = '0;
    end
    n = NSLICE;
    for (int lvl = 0; lvl < AW; lvl++) begin
      n = n / 2;
      for (int k = 0; k < NSLICE / 2; k++) begin
        if (k < n) begin
          if (v[2*k+1] > v[2*k]) begin
            v[k] = v[2*k+1];
            a[k] = a[2*k+1] | AW'(1 << lvl);
          end else begin
            v[k] = v[2*k];
            a[k] = a[2*k];
          end
        end
      end
    end
    max_val = v[0];
    adr     = a[0];
    at      = (v[0] > thr);
  end
endmodule
