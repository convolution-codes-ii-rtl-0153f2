// tb_addr_counters: checks the write address (up on writes) and the read
// address (down on reads), both mod 24, and the address multiplexer, first in
// the 1-write/5-read schedule, whose read addresses must run 23..19, 18..14,
// ... as in the reference timing diagram, then with random wrrd_n and en.
module tb_addr_counters;
  localparam int DEPTH = 24;
  logic clk = 0, rst = 1, en = 1, wrrd_n = 1;
  logic [4:0] wr_addr, rd_addr, addr;
  int checks = 0, failures = 0;
  int mw, mr;
  int exp_addr [12] = '{0, 23, 22, 21, 20, 19, 1, 18, 17, 16, 15, 14};

  addr_counters #(.DEPTH(DEPTH)) dut (.clk, .rst, .en, .wrrd_n, .wr_addr, .rd_addr, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mw = 0; mr = DEPTH - 1;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      if (i < 600) begin wrrd_n = (i % 6 == 0); en = 1; end
      else begin wrrd_n = 1'($urandom); en = ($urandom_range(0, 4) != 0); end
      #1;
      checks++;
      if (wr_addr !== 5'(mw) || rd_addr !== 5'(mr) || addr !== (wrrd_n ? 5'(mw) : 5'(mr))) begin
        failures++; $display("i=%0d wr=%0d rd=%0d addr=%0d model %0d %0d", i, wr_addr, rd_addr, addr, mw, mr);
      end
      if (i < 12) begin
        checks++;
        if (int'(addr) != exp_addr[i]) begin failures++; $display("addr %0d expected %0d", addr, exp_addr[i]); end
      end
      @(posedge clk);
      if (en && wrrd_n) mw = (mw + 1) % DEPTH;
      if (en && !wrrd_n) mr = (mr + DEPTH - 1) % DEPTH;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
