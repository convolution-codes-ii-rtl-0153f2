// out_shift_reg: bidirectional output shift register that restores time
// order of the decoded bits.
//
// The trace-back produces the D bits of the data region newest first.  In
// each savedata read the register shifts left and takes the bit d into A[0],
// so after D reads the oldest bit is in A[0].  In each write cycle (wrrd_n)
// it shifts right and A[0] is sent out: dataout = A[0] & wrrd_n, one decoded
// bit per r+w period, which matches the rate at which symbols arrive.
//
// This single register is sufficient only while all D data reads fall
// between two writes (D <= r); survivor_unit uses dual_shift_reg otherwise.
//
// Interface: dataout is a one-cycle pulse in the write cycle; A is visible for
// test.  Reset clears A.  The shift directions and the output gating follow
// the source.
module out_shift_reg #(
  parameter int unsigned D = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         wrrd_n,
  input  logic         savedata,
  input  logic         d,
  output logic [D-1:0] a,
  output logic         dataout
);

  always_ff @(posedge clk) begin
    if (rst)
      a <= '0;
    else if (en) begin
      if (savedata)
        a <= (a << 1) | D'(d);
      else if (wrrd_n)
        a <= a >> 1;
    end
  end

  assign dataout = a[0] & wrrd_n;

endmodule
