// dual_shift_reg: two-register output reordering for trace-back schemes in
// which a write cycle can fall inside the data region (D > r).
//
// The collecting register A only ever shifts left: on each savedata read it
// takes the decoded bit d into A[0].  On the last read of the data region
// (end_of_d) the complete group, A shifted once more with that last bit, is
// copied into the output register B.  B only ever shifts right: in each write
// cycle it sends B[0] out (dataout = B[0] & wrrd_n) and shifts.  A write that
// comes in the middle of the data reads therefore cannot disturb the group
// being collected, and the group leaves oldest bit first, one per write.
// B is emptied in the W = D writes of one trace-back cycle, just before the
// next group is copied in.
//
// Interface as out_shift_reg, plus end_of_d.  Reset clears both registers.
// The structure (shift in left on top, copy down at the last data read,
// shift out right below) follows the source's dual shift-register scheme.
module dual_shift_reg #(
  parameter int unsigned D = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         wrrd_n,
  input  logic         savedata,
  input  logic         end_of_d,
  input  logic         d,
  output logic [D-1:0] a,
  output logic [D-1:0] b,
  output logic         dataout
);

  logic [D-1:0] a_nxt;
  assign a_nxt = (a << 1) | D'(d);

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else if (en) begin
      if (savedata) a <= a_nxt;
      if (end_of_d)
        b <= a_nxt;
      else if (wrrd_n)
        b <= b >> 1;
    end
  end

  assign dataout = b[0] & wrrd_n;

endmodule
