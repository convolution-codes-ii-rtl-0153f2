// tb_acs_array: checks the four ACS units and H registers.
// Part 1 replays the worked 10-step trellis example (received symbols
// 11 10 00 10 00 01 01 11 11 10) and checks the printed survivor metrics at
// t = 1, 2, 3 and 10.  Part 2 runs random symbols against a forward trellis
// model with unbounded integer metrics (ties go to the predecessor ending in
// 0), comparing every came_from word and every metric modulo 64; the run is
// long enough for the 6-bit registers to wrap many times.
module tb_acs_array;
  import viterbi_pkg::*;
  localparam int HW = 6;
  logic clk = 0, rst = 1, acs_en = 0;
  symbol_t symbol = 0;
  logic [3:0] came_from;
  logic [3:0][HW-1:0] h;
  int checks = 0, failures = 0;
  int mh [4], nh [4];
  logic [3:0] mcf;
  logic [1:0] ex_sym [10] = '{2'b11, 2'b10, 2'b00, 2'b10, 2'b00, 2'b01, 2'b01, 2'b11, 2'b11, 2'b10};
  // Printed survivor metrics, index = state number {newest, older}:
  // states 00, 01, 10, 11 -> printed rows S00, S01, S10, S11.
  int fig_t1 [4] = '{0, 1, 0, 1};
  int fig_t2 [4] = '{1, 0, 1, 1};
  int fig_t3 [4] = '{1, 2, 0, 2};
  int fig_t10[4] = '{3, 0, 3, 2};
  int maxh;

  acs_array #(.HW(HW)) dut (.clk, .rst, .acs_en, .symbol, .came_from, .h);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Forward model: from state {s1,s0} with input x to {x,s1}, code bits
  // (x^s1^s0, x^s0); branch metric = number of differing bits.
  task automatic model_step(input logic [1:0] sym);
    int best [4];
    int cand, bm;
    logic [1:0] out;
    for (int n = 0; n < 4; n++) best[n] = -1;
    for (int p = 0; p < 4; p++)
      for (int x = 0; x < 2; x++) begin
        int n = x * 2 + (p >> 1);
        out[1] = 1'(x ^ (p >> 1) ^ (p & 1));
        out[0] = 1'(x ^ (p & 1));
        bm = int'(out[1] != sym[1]) + int'(out[0] != sym[0]);
        cand = mh[p] + bm;
        if (best[n] < 0 || cand < best[n]) begin
          best[n] = cand;
          mcf[n] = 1'(p & 1);
        end
      end
    for (int n = 0; n < 4; n++) nh[n] = best[n];
  endtask

  task automatic check_step(input logic [1:0] sym);
    symbol = sym; acs_en = 1;
    model_step(sym);
    #1;
    checks++;
    if (came_from !== mcf) begin
      failures++; $display("came_from %b expected %b", came_from, mcf);
    end
    @(posedge clk); #1;
    acs_en = 0;
    for (int n = 0; n < 4; n++) begin
      mh[n] = nh[n];
      checks++;
      if (h[n] !== HW'(mh[n])) begin
        failures++; $display("H[%0d]=%0d expected %0d", n, h[n], mh[n] % 64);
      end
    end
  endtask

  task automatic check_fig(input int t, input int exp [4]);
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (int'(h[n]) != exp[n]) begin
        failures++; $display("t=%0d state %0d: H=%0d printed %0d", t, n, h[n], exp[n]);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 4; n++) mh[n] = 0;
    @(posedge clk); #1 rst = 0;
    // hold: acs_en low must not change H
    @(posedge clk); #1;
    for (int t = 0; t < 10; t++) begin
      check_step(ex_sym[t]);
      if (t == 0) check_fig(1, fig_t1);
      if (t == 1) check_fig(2, fig_t2);
      if (t == 2) check_fig(3, fig_t3);
      if (t == 9) check_fig(10, fig_t10);
    end
    maxh = 0;
    for (int i = 0; i < 2000; i++) begin
      check_step(2'($urandom));
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    for (int n = 0; n < 4; n++) if (mh[n] > maxh) maxh = mh[n];
    checks++;
    if (maxh < 256) begin failures++; $display("metrics did not wrap (max %0d)", maxh); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
