// error_generator: pseudorandom channel-error injector with an error counter.
//
// An 18-stage shift register with feedback x0 = x7 XOR x18 (polynomial
// 1 + x^7 + x^18, period 2^18 - 1) shifts once per enabled clock.  The error
// signal is the AND of the first errorctrl entries of TAPS, a list of stage
// numbers spread along the register: with n bits ANDed an error occurs with
// probability about 2^-n per clock (errorctrl = 6 gives about 1/64,
// 8 about 1/256); errorctrl = 0 turns errors off.  Because the register
// shifts every clock and the two bits of a symbol are sampled at different
// clocks, an error does not always flip both z1 and z0.
//
// rx_out = rx_in XOR err.  errorcnt counts the errors that fell on a clock
// where the serial-to-parallel samples the channel (sample high), i.e. the
// errors the decoder really saw; it wraps at 2^CNT_W.
//
// Timing: err, rx_out are combinational from the register and rx_in;
// errorcnt is registered.  Synchronous reset loads SEED and clears the count.
// The register length, the feedback taps, the AND of register bits and the
// rule of counting only sampled errors follow the source; the AND tap
// positions, the errorctrl encoding, the seed and the counter width are this
// design's choice.
module error_generator #(
  parameter int unsigned LEN   = 18,
  parameter int unsigned FB    = 7,          // second feedback stage
  parameter int unsigned NTAPS = 12,
  parameter int unsigned CNT_W = 16,
  parameter logic [LEN:1] SEED = LEN'(1),
  parameter int unsigned TAPS [NTAPS] = '{1, 10, 16, 5, 13, 8, 18, 3, 14, 11, 6, 17},
  localparam int unsigned CTRL_W = $clog2(NTAPS + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [CTRL_W-1:0] errorctrl,
  input  logic             sample,
  input  logic             rx_in,
  output logic             rx_out,
  output logic             err,
  output logic [CNT_W-1:0] errorcnt
);

  logic [LEN:1] sr;   // stage k holds x^k

  always_ff @(posedge clk) begin
    if (rst)
      sr <= SEED;
    else if (en)
      sr <= {sr[LEN-1:1], sr[FB] ^ sr[LEN]};
  end

  always_comb begin
    err = (errorctrl != '0);
    for (int unsigned i = 0; i < NTAPS; i++)
      if (i < errorctrl) err = err & sr[TAPS[i]];
  end

  assign rx_out = rx_in ^ err;

  always_ff @(posedge clk) begin
    if (rst)
      errorcnt <= '0;
    else if (en && sample && err)
      errorcnt <= errorcnt + 1'b1;
  end

endmodule
