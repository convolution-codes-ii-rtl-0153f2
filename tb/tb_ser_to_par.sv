// tb_ser_to_par: random serial bits; checks that the symbol holds the bits on
// the line at counts 2 (z1) and 4 (z0), that nothing else is captured, and
// that sample is high exactly at those two counts.
module tb_ser_to_par;
  import viterbi_pkg::*;
  localparam int RW = 6;
  logic clk = 0, rst = 1, en = 1;
  logic [2:0] count = 0;
  logic rx_serial = 0, sample;
  symbol_t symbol;
  int checks = 0, failures = 0;
  logic m1, m0;

  ser_to_par #(.RW(RW)) dut (.clk, .rst, .en, .count, .rx_serial, .symbol, .sample);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m1 = 0; m0 = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1500; i++) begin
      count = 3'(i % RW);
      en = ($urandom_range(0, 7) != 0);
      rx_serial = 1'($urandom);
      #1;
      checks++;
      if (sample !== (en && (count == 2 || count == 4))) begin
        failures++; $display("sample wrong at count %0d", count);
      end
      @(posedge clk);
      if (en && count == 2) m1 = rx_serial;
      if (en && count == 4) m0 = rx_serial;
      #1;
      checks++;
      if (symbol !== {m1, m0}) begin
        failures++; $display("symbol %b expected %b", symbol, {m1, m0});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
