// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2, K=3 code.
//
// The serial channel bits are collected into a symbol {z1,z0}; once per r+w
// period, in the write cycle, the four ACS units update the path metrics and
// their came_from bits are written into the survivor memory; in the r read
// cycles of the period the trace-back walks the memory backwards and, every
// W periods, delivers W decoded bits, which leave one per period.
//
// Interface: count/wrrd_n come from the system's master mod r+w counter;
// rx_serial is the (possibly corrupted) channel bit; sample tells an error
// generator when the channel is sampled; dataout is the decoded bit, a pulse
// in the write cycle, marked by dout_valid.
// Latency: the bit encoded in the write cycle of period k leaves in the write
// cycle of period k + 1 + W+S+D (25 periods at the default sizes).
// The structure follows the source; default sizes are its main choice
// (S = 16, r:w = 5:1, W = D = 4, 6-bit metrics).  The path metrics h are
// brought out of the ACS array only for test benches to observe.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned R  = 5,
  parameter int unsigned S  = 16,
  parameter int unsigned D  = 4,
  parameter int unsigned HW = 6,
  localparam int unsigned RW = R + 1,
  localparam int unsigned CW = $clog2(RW)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [CW-1:0] count,
  input  logic          wrrd_n,
  input  logic          rx_serial,
  output logic          sample,
  output logic          dataout,
  output logic          dout_valid
);

  symbol_t                    symbol;
  logic [NSTATES-1:0]         came_from;
  logic [NSTATES-1:0][HW-1:0] h;

  ser_to_par #(.RW(RW)) u_s2p (
    .clk, .rst, .en, .count, .rx_serial, .symbol, .sample
  );

  acs_array #(.HW(HW)) u_acs (
    .clk, .rst,
    .acs_en (en && wrrd_n),
    .symbol, .came_from, .h
  );

  survivor_unit #(.R(R), .S(S), .D(D)) u_surv (
    .clk, .rst, .en, .wrrd_n, .came_from, .dataout, .dout_valid
  );

endmodule
