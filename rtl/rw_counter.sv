// rw_counter: the master mod (r+w) counter of the encoder/decoder system.
//
// With one write per r reads (w = 1) every period of r+w clocks holds exactly
// one survivor-memory write cycle.  The counter runs 0,1,..,RW-1,0,.. while en
// is high and holds while en is low; wrrd_n (write high / read low) is high
// while the count is zero.  Every other block times its enables from this one
// count, so the system has a single clock.
//
// Interface: clk, synchronous active-high rst (count back to 0), en.
// Timing: count and wrrd_n change on the rising clock edge; wrrd_n is a
// decode of the registered count, so it is glitch-free within the cycle.
// The decode "write when the count is zero" and reset to zero follow the
// source; the synchronous reset and the en hold are this design's choice.
module rw_counter #(
  parameter int unsigned RW = 6,                 // r + w
  localparam int unsigned CW = (RW > 1) ? $clog2(RW) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [CW-1:0] count,
  output logic          wrrd_n
);

  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (en)
      count <= (count == CW'(RW - 1)) ? '0 : count + 1'b1;
  end

  assign wrrd_n = (count == '0);

endmodule
