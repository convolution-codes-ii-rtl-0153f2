// tb_survivor_unit: checks the survivor memory / trace-back subsystem
// against an exact reference trace-back, at the default sizes
// (S = 16, r = 5, W = D = 4), at S = 16, r = 9, W = D = 2 (single output
// register), and at two sizes where writes fall inside the data reads and the
// dual output register is used: S = 16, r = 2, W = D = 16 and
// S = 15, r = 4, W = D = 5.  Besides the decoded bits it checks the latency
// of W+S+D writes and the one-bit-per-write output rate.
module tb_survivor_unit;
  logic clk = 0;
  int c0, f0, c1, f1, c2, f2, c3, f3;
  logic d0, d1, d2, d3;

  always #5 clk = ~clk;

  surv_checker #(.R(5), .S(16), .D(4), .NWRITES(600)) u_default (.clk, .checks(c0), .failures(f0), .done(d0));
  surv_checker #(.R(9), .S(16), .D(2), .NWRITES(400)) u_small   (.clk, .checks(c1), .failures(f1), .done(d1));
  surv_checker #(.R(2), .S(16), .D(16), .NWRITES(800)) u_dual2  (.clk, .checks(c2), .failures(f2), .done(d2));
  surv_checker #(.R(4), .S(15), .D(5), .NWRITES(600)) u_dual4   (.clk, .checks(c3), .failures(f3), .done(d3));

  initial begin
    fork
      begin
        repeat (50000) @(posedge clk);
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
        $finish;
      end
      begin
        wait (d0 && d1 && d2 && d3);
        #1;
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
        $finish;
      end
    join_any
  end
endmodule
