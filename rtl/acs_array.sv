// acs_array: the four add-compare-select units of the 4-state decoder, with
// their branch metrics and path-metric (H) registers.
//
// For each new state N = {x, a} the two predecessors are {a,0} (upper) and
// {a,1} (lower).  The branch metric of each transition is the Hamming
// distance between the received symbol and the code symbol the encoder
// would send on it (viterbi_pkg::enc_out).  One acs_unit per state picks the
// survivor, and its came_from bit goes to bit N of the survivor word.
//
// Timing: came_from is combinational from the H registers and the symbol and
// is meant to be written to the survivor memory in the same cycle in which
// acs_en is high; the H registers load the new metrics at the end of that
// cycle.  Reset sets all H to zero (all states equally likely at start).
// The 4-ACS structure, the butterfly wiring, the came_from bit order
// (state 00 -> bit 0, 10 -> bit 2, 01 -> bit 1, 11 -> bit 3), all-zero start
// metrics and the 6-bit metric width follow the source; the branch-metric
// formulation as a Hamming distance is the usual hard-decision choice.
module acs_array
  import viterbi_pkg::*;
#(
  parameter int unsigned HW = 6
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   acs_en,
  input  symbol_t                symbol,
  output logic [NSTATES-1:0]     came_from,
  output logic [NSTATES-1:0][HW-1:0] h
);

  logic [NSTATES-1:0][HW-1:0] h_nxt;

  for (genvar n = 0; n < NSTATES; n++) begin : g_acs
    localparam logic   X  = 1'(n >> 1);        // newest bit of state n
    localparam state_t PU = state_t'((n & 1) << 1);      // {a,0}
    localparam state_t PD = state_t'(((n & 1) << 1) | 1); // {a,1}

    logic [1:0] bm_up, bm_dn;
    assign bm_up = hamming2(symbol, enc_out(X, PU));
    assign bm_dn = hamming2(symbol, enc_out(X, PD));

    acs_unit #(.HW(HW)) u_acs (
      .h_up      (h[PU]),
      .h_dn      (h[PD]),
      .bm_up     (bm_up),
      .bm_dn     (bm_dn),
      .h_new     (h_nxt[n]),
      .came_from (came_from[n])
    );
  end

  always_ff @(posedge clk) begin
    if (rst)
      h <= '0;
    else if (acs_en)
      h <= h_nxt;
  end

endmodule
