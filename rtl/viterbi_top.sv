// viterbi_top: complete encoder / error generator / decoder system.
//
// One master mod (r+w) counter times everything.  The encoder takes txdata
// once per period and sends z1 and z0 serially on tx_coded.  The received
// channel bit rx_coded (looped back from tx_coded by the test bench) passes
// through the error generator, which flips bits at a rate set by errorctrl
// (about 2^-errorctrl per clock, 0 = off) and counts in errorcnt the errors
// that hit a sampled bit, and then into the decoder.  rxdata is the decoded
// bit, valid (rxvalid) in the write cycle of each period.
//
// Timing: with tx_coded looped straight to rx_coded, the bit taken in the
// write cycle of period k appears on rxdata in the write cycle of period
// k + 1 + W+S+D; en low freezes the whole system.  Reset is synchronous and
// active high.  Default sizes are the source's main configuration.  The
// encoder's symbol and state and the raw error pulse are left unconnected
// inside, for test benches to observe.
module viterbi_top #(
  parameter int unsigned R     = 5,     // reads per write (r), w = 1
  parameter int unsigned S     = 16,    // trace-back convergence depth
  parameter int unsigned D     = 4,     // W = D decoded bits per trace-back
  parameter int unsigned HW    = 6,     // path metric width
  parameter int unsigned CNT_W = 16,    // error counter width
  localparam int unsigned CTRL_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              txdata,
  output logic              tx_coded,
  input  logic              rx_coded,
  input  logic [CTRL_W-1:0] errorctrl,
  output logic [CNT_W-1:0]  errorcnt,
  output logic              rxdata,
  output logic              rxvalid
);

  localparam int unsigned RW = R + 1;
  localparam int unsigned CW = $clog2(RW);

  logic [CW-1:0] count;
  logic          wrrd_n, rx_bit, sample, err;
  viterbi_pkg::symbol_t tx_symbol;
  viterbi_pkg::state_t  tx_state;

  rw_counter #(.RW(RW)) u_cnt (
    .clk, .rst, .en, .count, .wrrd_n
  );

  conv_encoder #(.RW(RW)) u_enc (
    .clk, .rst, .en, .count, .txdata,
    .tx_serial (tx_coded),
    .symbol    (tx_symbol),
    .state     (tx_state)
  );

  error_generator #(.CNT_W(CNT_W)) u_err (
    .clk, .rst, .en, .errorctrl, .sample,
    .rx_in  (rx_coded),
    .rx_out (rx_bit),
    .err,
    .errorcnt
  );

  viterbi_decoder #(.R(R), .S(S), .D(D), .HW(HW)) u_dec (
    .clk, .rst, .en, .count, .wrrd_n,
    .rx_serial  (rx_bit),
    .sample,
    .dataout    (rxdata),
    .dout_valid (rxvalid)
  );

endmodule
