// survivor_unit: survivor memory and trace-back of the Viterbi decoder.
//
// Memory of W+S+D 4-bit words (W = D), used as a ring.  In every r+w period
// the came_from word of the ACS units is written once (wrrd_n high) at the
// up-counting write address, and r words are read back at the down-counting
// read address.  Reads are grouped into trace-back cycles of S+D reads,
// counted by countTB: S reads walk the path back until it has merged with the
// survivor, and the last D reads yield D decoded bits, newest first, which
// the output shift register reverses and sends out one per write cycle.
// Since S+D = r*W, the areas being written, traced and read out rotate by W
// words per trace-back cycle, and the last data word read is the next word
// to be overwritten.
//
// Latency: the data bit of the word written in write cycle n leaves on
// dataout in write cycle n + W+S+D.
//
// The time order is restored by out_shift_reg when all D data reads fall
// between two writes (D <= r, as at the default sizes) and by dual_shift_reg
// otherwise (e.g. r:w = 2:1 with W = D = 16).
//
// Interface: came_from is sampled in the write cycle; dataout is a pulse in
// the write cycle (dout_valid marks the enabled write cycles).  The
// organisation, counters and both output registers follow the source; the
// start state of each trace-back (00) is this design's choice.  The
// addresses, countTB, J, p and the register contents are named signals that
// drive nothing outside; they are kept so test benches can observe them.
module survivor_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned R = 5,            // reads per write
  parameter int unsigned S = 16,           // convergence depth
  parameter int unsigned D = 4,            // data bits per trace-back (= W)
  localparam int unsigned DEPTH = 2 * D + S,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned TW = $clog2(S + D)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               wrrd_n,
  input  logic [NSTATES-1:0] came_from,
  output logic               dataout,
  output logic               dout_valid
);

  initial begin
    assert (S + D == R * D)
      else $fatal(1, "survivor_unit: S + D must equal r * W");
  end

  logic [AW-1:0] wr_addr, rd_addr, addr;
  logic [TW-1:0] count_tb;
  logic [3:0]    wrd;
  logic          savedata, end_of_d, p, d;
  state_t        j;

  addr_counters #(.DEPTH(DEPTH)) u_addr (
    .clk, .rst, .en, .wrrd_n,
    .wr_addr, .rd_addr, .addr
  );

  surv_mem #(.DEPTH(DEPTH), .DW(NSTATES)) u_mem (
    .clk,
    .we   (en && wrrd_n),
    .addr,
    .din  (came_from),
    .dout (wrd)
  );

  tb_counter #(.S(S), .D(D)) u_tbc (
    .clk, .rst, .en, .wrrd_n,
    .count_tb, .savedata, .end_of_d
  );

  traceback_unit u_trace (
    .clk, .rst,
    .rd_en   (en && !wrrd_n),
    .restart (end_of_d),
    .wrd, .j, .p, .d
  );

  // All D data reads fall between two writes when D <= r: one bidirectional
  // register is enough.  Otherwise a write can interrupt the data reads and
  // the two-register scheme is used.
  if (D <= R) begin : g_single
    logic [D-1:0] a;
    out_shift_reg #(.D(D)) u_out (
      .clk, .rst, .en, .wrrd_n, .savedata, .d,
      .a, .dataout
    );
  end else begin : g_dual
    logic [D-1:0] a, b;
    dual_shift_reg #(.D(D)) u_out (
      .clk, .rst, .en, .wrrd_n, .savedata, .end_of_d, .d,
      .a, .b, .dataout
    );
  end

  assign dout_valid = en && wrrd_n;

endmodule
