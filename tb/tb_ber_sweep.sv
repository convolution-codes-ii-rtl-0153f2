// tb_ber_sweep: decoded error rate against counted channel error rate, for
// 100 000 random bits at each of errorctrl = 4..9 (about 1/16 .. 1/512 errors
// per clock), whole system at default sizes with the channel looped back.
// Checks per point: errorcnt equals the errors the decoder really sampled,
// and from 1/32 on the decoded error rate is below the channel error rate.
// Over the sweep the decoded error count must fall as the channel improves.
// The spread of the four path metrics (largest signed 6-bit difference) is
// watched on every clock and must stay within 24, the bound the 6-bit
// wrap-around compare relies on.  A table of the points is printed.
module tb_ber_sweep;
  localparam int LAT = 25, NBITS = 100000;
  logic clk = 0, rst = 1, en = 1, txdata = 0, tx_coded;
  logic [3:0] errorctrl = 0;
  logic [15:0] errorcnt;
  logic rxdata, rxvalid;
  int checks = 0, failures = 0;
  logic tx [NBITS];
  int p, out_err, flips;
  int out_at [16];
  real ch_ber, dec_ber;
  int spread, max_spread = 0;
  logic signed [5:0] dh;

  viterbi_top dut (
    .clk, .rst, .en, .txdata, .tx_coded, .rx_coded(tx_coded),
    .errorctrl, .errorcnt, .rxdata, .rxvalid
  );

  always #5 clk = ~clk;

  always @(posedge clk)
    if (!rst && dut.sample && dut.rx_bit != tx_coded) flips++;

  always @(posedge clk) if (!rst) begin
    spread = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        dh = 6'(dut.u_dec.u_acs.h[i] - dut.u_dec.u_acs.h[j]);
        if (int'(dh) > spread) spread = int'(dh);
      end
    if (spread > max_spread) max_spread = spread;
  end

  initial begin
    repeat (8 * 7 * (NBITS + LAT)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $display("errorctrl  channel_errors  channel_BER  decoded_errors  decoded_BER");
    for (int ec = 4; ec <= 9; ec++) begin
      for (int i = 0; i < NBITS; i++) tx[i] = 1'($urandom);
      rst = 1; errorctrl = 4'(ec);
      @(posedge clk); #1 rst = 0;
      flips = 0; p = 0; out_err = 0;
      txdata = tx[0];
      while (p < NBITS + LAT) begin
        #1;
        if (rxvalid && p >= LAT && rxdata !== tx[p - LAT]) out_err++;
        @(posedge clk);
        if (dut.wrrd_n) p++;
        #1;
        txdata = (p < NBITS) ? tx[p] : 1'b0;
      end
      out_at[ec] = out_err;
      ch_ber = real'(errorcnt) / real'(2 * NBITS);
      dec_ber = real'(out_err) / real'(NBITS);
      $display("%9d  %14d  %11.6f  %14d  %11.6f", ec, errorcnt, ch_ber, out_err, dec_ber);
      checks++;
      if (int'(errorcnt) != flips) begin
        failures++; $display("errorcnt %0d but %0d sampled flips", errorcnt, flips);
      end
      if (ec >= 5) begin
        checks++;
        if (dec_ber >= ch_ber) begin failures++; $display("no coding gain at errorctrl=%0d", ec); end
      end
    end
    $display("largest path-metric spread seen: %0d", max_spread);
    checks++;
    if (max_spread > 24) begin
      failures++; $display("path-metric spread %0d exceeds 24", max_spread);
    end
    checks++;
    if (out_at[9] > out_at[5] || out_at[5] > out_at[4]) begin
      failures++; $display("decoded errors do not fall with the channel error rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
