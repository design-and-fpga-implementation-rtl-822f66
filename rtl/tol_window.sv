// tol_window: tolerance window comparator.
//
// Tells whether a new value lies inside the window [ref - delta, ref + delta],
// the matching rule the algorithm uses for frequency, PA and PW when a PDW is
// compared with a PDW cluster, and for a new PRI against a PRI cluster.
// The comparison is done on W+1-bit values so that ref + delta cannot wrap
// and ref - delta below zero simply leaves the lower bound open; this guard
// against wrap-around is this design's own detail. Purely combinational.
module tol_window #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] new_val,
  input  logic [W-1:0] ref_val,
  input  logic [W-1:0] delta,
  output logic         in_win
);
  logic [W:0] hi, lo;
  logic       lo_neg;

  always_comb begin
    hi     = {1'b0, ref_val} + {1'b0, delta};
    lo_neg = delta > ref_val;
    lo     = {1'b0, ref_val} - {1'b0, delta};
    in_win = ({1'b0, new_val} <= hi) && (lo_neg || ({1'b0, new_val} >= lo));
  end
endmodule
