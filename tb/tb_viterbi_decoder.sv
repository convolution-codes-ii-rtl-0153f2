// tb_viterbi_decoder: drives the decoder with the serial channel of a private
// encoder model (z1 = x^s1^s0 on counts 1..3, z0 = x^s0 on counts 4, 5, 0),
// random data, and checks that the bit taken in period k is decoded in the
// write cycle of period k + 25.  One phase is error free; in a second phase
// isolated channel bits (one every 30 periods or more) are flipped, which a
// free-distance-5 code must correct; a third phase stalls en at random.
module tb_viterbi_decoder;
  localparam int R = 5, RW = R + 1, LAT = 25, N = 1500;
  logic clk = 0, rst = 1, en = 1;
  logic [2:0] count;
  logic wrrd_n, rx_serial, sample, dataout, dout_valid;
  int checks = 0, failures = 0;
  logic tx [N];
  logic [1:0] st;
  logic z1, z0;
  int p, flips, next_flip, stalls;

  viterbi_decoder dut (.clk, .rst, .en, .count, .wrrd_n, .rx_serial, .sample, .dataout, .dout_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(input int mode);   // 0 clean, 1 flips, 2 stalls
    rst = 1; en = 1; count = 0; @(posedge clk); #1 rst = 0;
    for (int i = 0; i < N; i++) tx[i] = 1'($urandom);
    st = 0; z1 = 0; z0 = 0; p = 0; next_flip = 40;
    while (p < N) begin
      wrrd_n = (count == 0);
      en = (mode == 2) ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (!en) stalls++;
      rx_serial = (count != 0 && count <= 3) ? z1 : z0;
      if (mode == 1 && p == next_flip && (count == 2 || count == 4) && en) begin
        rx_serial = ~rx_serial; flips++;
        next_flip = p + 30 + $urandom_range(0, 20);
      end
      #1;
      checks++;
      if (sample !== (en && (count == 2 || count == 4))) failures++;
      if (en && wrrd_n) begin
        checks++;
        if (dout_valid !== 1'b1) failures++;
        if (p >= LAT) begin
          checks++;
          if (dataout !== tx[p - LAT]) begin
            failures++;
            $display("mode %0d period %0d: decoded %0b sent %0b", mode, p, dataout, tx[p - LAT]);
          end
        end
      end
      @(posedge clk); #1;
      if (en) begin
        if (count == 0) begin
          z1 = tx[p] ^ st[1] ^ st[0];
          z0 = tx[p] ^ st[0];
          st = {tx[p], st[1]};
          p++;
        end
        count = (count == 3'(R)) ? 3'd0 : count + 3'd1;
      end
    end
  endtask

  initial begin
    flips = 0; stalls = 0;
    count = 0; wrrd_n = 1; rx_serial = 0;
    run_phase(0);
    run_phase(1);
    run_phase(2);
    checks++;
    if (flips < 20) begin failures++; $display("too few channel errors injected"); end
    checks++;
    if (stalls < 100) begin failures++; $display("too few stalls"); end
    $display("flips=%0d stalls=%0d", flips, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
