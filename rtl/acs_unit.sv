// acs_unit: one add-compare-select of the Viterbi decoder.
//
// Two candidate path metrics are formed, upper = h_up + bm_up and
// lower = h_dn + bm_dn, in HW-bit modular arithmetic.  They are compared by
// subtracting, lower - upper, and looking at the sign bit: as long as the
// true metrics are less than half the modulus (2^(HW-1)) apart, the sign is
// right even after either sum has wrapped around, so the metric registers
// never need rescaling.  The smaller candidate is selected; on a tie the upper
// one wins.  came_from is 0 when the upper predecessor is chosen, 1 for the
// lower.
//
// Interface: purely combinational; h_up/h_dn are the predecessor metrics,
// bm_up/bm_dn the 2-bit branch metrics (Hamming distances 0..2).
// The subtract-and-test-the-sign comparison follows the source; the tie rule
// follows its worked example, and the sign convention of came_from is this
// design's choice.
module acs_unit #(
  parameter int unsigned HW = 6
) (
  input  logic [HW-1:0] h_up,
  input  logic [HW-1:0] h_dn,
  input  logic [1:0]    bm_up,
  input  logic [1:0]    bm_dn,
  output logic [HW-1:0] h_new,
  output logic          came_from
);

  logic [HW-1:0] cand_up, cand_dn, diff;

  assign cand_up   = h_up + HW'(bm_up);
  assign cand_dn   = h_dn + HW'(bm_dn);
  assign diff      = cand_dn - cand_up;
  assign came_from = diff[HW-1];          // lower strictly smaller
  assign h_new     = came_from ? cand_dn : cand_up;

endmodule
