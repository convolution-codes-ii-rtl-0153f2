// traceback_unit: follows the survivor path backwards through the trellis.
//
// J is the trellis state reached at the time of the word now being read.
// In each read cycle the came_from bit of that state, p = wrd[J], names its
// predecessor, and J steps to {J[0], p} at the end of the cycle.  The data
// bit that led into state J is its newest bit, d = J[1].  After the last read
// of the data region (restart high) J returns to state 00, so each trace-back
// cycle starts from a fixed, arbitrary state and relies on the S-word
// convergence region.
//
// Interface: wrd is the survivor word read this cycle; rd_en is high in
// enabled read cycles.  p and d are combinational, J is registered.
// Reset: J = 00.  The bit select, the next-state rule and d = J[1] follow the
// source; restarting from state 00 on every trace-back cycle is this
// design's choice.
module traceback_unit
  import viterbi_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       rd_en,
  input  logic       restart,
  input  logic [3:0] wrd,
  output state_t     j,
  output logic       p,
  output logic       d
);

  assign p = wrd[j];
  assign d = j[1];

  always_ff @(posedge clk) begin
    if (rst)
      j <= '0;
    else if (rd_en)
      j <= restart ? state_t'(0) : {j[0], p};
  end

endmodule
