// ser_to_par: serial-to-parallel converter of the received channel bits.
//
// The channel carries z1 then z0 of each code symbol within one r+w period.
// z1 is captured at count Z1S and z0 at count Z0S (2 and 4 for r+w = 6);
// both are held until the ACS units use {z1,z0} in the next write cycle
// (count 0).  sample is high in the two capture cycles, so that an error
// generator can count only the channel errors that were actually used.
//
// Interface: rx_serial in, symbol = {z1, z0} out (registered), sample out.
// Reset clears the symbol to 00.
// The capture counts follow the source's timing map (z1 on cycle 2, z0 on
// cycle 4); their generalisation to other r+w values is this design's own.
module ser_to_par
  import viterbi_pkg::*;
#(
  parameter int unsigned RW = 6,
  localparam int unsigned CW = (RW > 1) ? $clog2(RW) : 1,
  localparam int unsigned Z1S = z1_sample(RW),
  localparam int unsigned Z0S = z0_sample(RW)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [CW-1:0] count,
  input  logic          rx_serial,
  output symbol_t       symbol,
  output logic          sample
);

  logic take_z1, take_z0;
  assign take_z1 = en && (count == CW'(Z1S));
  assign take_z0 = en && (count == CW'(Z0S));
  assign sample  = take_z1 || take_z0;

  always_ff @(posedge clk) begin
    if (rst)
      symbol <= '0;
    else begin
      if (take_z1) symbol[1] <= rx_serial;
      if (take_z0) symbol[0] <= rx_serial;
    end
  end

endmodule
