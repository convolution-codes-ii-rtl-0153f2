// conv_encoder: rate-1/2, constraint-length-3 convolutional encoder with a
// serial channel output.
//
// Once per r+w period, in the write cycle (count == 0, en high), the encoder
// takes txdata, registers the code symbol {z1,z0} = enc_out(txdata, state)
// and shifts txdata into its 2-bit state from the left.  The registered
// symbol is then sent serially: z1 on counts 1..RW/2, z0 on the remaining
// counts of the period (including the next count 0), so the receiver can
// sample each bit away from its edges.
//
// Interface: txdata must be stable during the count-0 cycle; tx_serial is the
// channel bit; symbol and state are visible for test.  Reset clears state and
// symbol (the encoder starts in state 00).
// The encoder advancing once every r+w clocks and z1/z0 occupying the two
// halves of the period follow the source's timing map; the generators
// (111, 101) and the exact split of the period are this design's choice
// (see viterbi_pkg).
module conv_encoder
  import viterbi_pkg::*;
#(
  parameter int unsigned RW = 6,
  localparam int unsigned CW = (RW > 1) ? $clog2(RW) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [CW-1:0] count,
  input  logic          txdata,
  output logic          tx_serial,
  output symbol_t       symbol,
  output state_t        state
);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= '0;
      symbol <= '0;
    end else if (en && count == '0) begin
      symbol <= enc_out(txdata, state);
      state  <= {txdata, state[1]};
    end
  end

  // z1 during the first half of the period (after the update), z0 after.
  assign tx_serial = (count != '0 && count <= CW'(RW / 2)) ? symbol[1] : symbol[0];

endmodule
