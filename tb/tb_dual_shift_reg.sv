// tb_dual_shift_reg: runs the two-register output reordering in the schedule
// of the r:w = 2:1, W = D = 16, S = 16 scheme: periods of 1 write + 2 reads,
// trace-backs of 32 reads (16 periods) whose last 16 reads carry data, so
// writes fall in the middle of the data reads.  Each group, saved newest
// first, must leave oldest first in the 16 writes after its last read, and
// dataout must be low in read cycles.
module tb_dual_shift_reg;
  localparam int D = 16, R = 2, S = 16;
  logic clk = 0, rst = 1, en = 1, wrrd_n = 0, savedata = 0, end_of_d = 0, d = 0;
  logic [D-1:0] a, b;
  logic dataout;
  int checks = 0, failures = 0;
  logic q [$];
  logic grp [$];
  logic exp;
  int nread, ctb, ngroups;

  dual_shift_reg #(.D(D)) dut (.clk, .rst, .en, .wrrd_n, .savedata, .end_of_d, .d, .a, .b, .dataout);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctb = S + D - 1; ngroups = 0;
    @(posedge clk); #1 rst = 0;
    for (int per = 0; per < 600; per++) begin
      for (int c = 0; c <= R; c++) begin
        wrrd_n = (c == 0);
        en = ($urandom_range(0, 7) != 0);
        savedata = !wrrd_n && ctb < D;
        end_of_d = !wrrd_n && ctb == 0;
        d = 1'($urandom);
        #1;
        if (wrrd_n) begin
          if (en && ngroups > 0) begin
            exp = q.pop_front();
            checks++;
            if (dataout !== exp) begin failures++; $display("period %0d dataout %0b expected %0b", per, dataout, exp); end
          end
        end else begin
          checks++;
          if (dataout !== 1'b0) begin failures++; $display("dataout high in a read cycle"); end
        end
        @(posedge clk); #1;
        if (!en) begin c--; continue; end
        if (savedata) grp.push_front(d);          // grp[0] = oldest (last read)
        if (end_of_d) begin
          while (grp.size() > 0) q.push_back(grp.pop_front());
          ngroups++;
        end
        if (!wrrd_n) ctb = (ctb == 0) ? S + D - 1 : ctb - 1;
      end
    end
    checks++;
    if (ngroups < 10) begin failures++; $display("too few groups"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
