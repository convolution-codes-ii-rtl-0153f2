// surv_mem: the survivor memory, DEPTH words of DW bits.
//
// A two-port register-file model: one synchronous write port and one read
// port sharing a single address.  When we (WrRd_N) is high the word din is
// written at addr on the rising clock edge; dout always shows the word at
// addr (read through an address-selected multiplexer, no read latency).
// The memory is not reset: every word is written before trace-back results
// that depend on it are used.
//
// The organisation (W+S+D words of 4 bits), one enable used only by the
// write port and the shared address follow the source's memory model.
module surv_mem #(
  parameter int unsigned DEPTH = 24,
  parameter int unsigned DW    = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= din;

  assign dout = mem[addr];

endmodule
