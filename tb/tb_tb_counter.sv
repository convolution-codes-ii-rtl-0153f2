// tb_tb_counter: checks the mod 20 trace-back counter: it counts 19..0 on
// reads only, savedata is high on reads with count 3..0 and end_of_d on the
// read with count 0.
module tb_tb_counter;
  localparam int S = 16, D = 4;
  logic clk = 0, rst = 1, en = 1, wrrd_n = 0;
  logic [4:0] count_tb;
  logic savedata, end_of_d;
  int checks = 0, failures = 0;
  int m, nsave, nend;

  tb_counter #(.S(S), .D(D)) dut (.clk, .rst, .en, .wrrd_n, .count_tb, .savedata, .end_of_d);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = S + D - 1; nsave = 0; nend = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4000; i++) begin
      if (i < 1200) begin wrrd_n = (i % 6 == 0); en = 1; end
      else begin wrrd_n = 1'($urandom); en = ($urandom_range(0, 4) != 0); end
      #1;
      checks++;
      if (count_tb !== 5'(m) || savedata !== (!wrrd_n && m < D) || end_of_d !== (!wrrd_n && m == 0)) begin
        failures++; $display("i=%0d count_tb=%0d model=%0d save=%0b end=%0b", i, count_tb, m, savedata, end_of_d);
      end
      if (savedata) nsave++;
      if (end_of_d) nend++;
      @(posedge clk);
      if (en && !wrrd_n) m = (m == 0) ? S + D - 1 : m - 1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
