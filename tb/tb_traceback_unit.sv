// tb_traceback_unit: random survivor words; checks p = wrd[J], d = J[1] and
// the step J -> {J[0], p} on enabled reads, J held otherwise, J = 00 after a
// restart read.
module tb_traceback_unit;
  logic clk = 0, rst = 1, rd_en = 0, restart = 0;
  logic [3:0] wrd = 0;
  logic [1:0] j;
  logic p, d;
  int checks = 0, failures = 0;
  int mj;

  traceback_unit dut (.clk, .rst, .rd_en, .restart, .wrd, .j, .p, .d);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mj = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      wrd = 4'($urandom);
      rd_en = ($urandom_range(0, 5) != 0);
      restart = ($urandom_range(0, 19) == 0);
      #1;
      checks++;
      if (j !== 2'(mj) || p !== wrd[mj] || d !== 1'(mj >> 1)) begin
        failures++; $display("i=%0d j=%0d model %0d p=%0b d=%0b wrd=%b", i, j, mj, p, d, wrd);
      end
      @(posedge clk);
      if (rd_en) mj = restart ? 0 : ((mj & 1) << 1) | int'(wrd[mj]);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
