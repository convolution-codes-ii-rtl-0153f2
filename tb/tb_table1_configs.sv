// tb_table1_configs: the whole system at every trace-back scheme of the
// speed / memory table (S; r,w; W = D): (15;2,1;15) (16;2,1;16) (16;3,1;8)
// (15;4,1;5) (16;5,1;4) (15;6,1;3) (18;7,1;3) (14;8,1;2) (16;9,1;2)
// (14;15,1;1), plus the simple one-bit-per-trace-back scheme (15;16,1;1)
// with 1 write and 16 reads over a 17-word ring.  Each runs 500 random bits error free and must return every
// bit exactly 2D+S+1 periods later, i.e. at a throughput of one bit per r+1
// clocks.  Schemes with D > r use the dual output register.
module tb_table1_configs;
  logic clk = 0;
  localparam int NC = 11;
  int c [NC], f [NC];
  logic dn [NC];
  int tc, tf;
  bit all_done;

  always #5 clk = ~clk;

  sys_checker #(.R(2),  .S(15), .D(15)) u0 (.clk, .checks(c[0]), .failures(f[0]), .done(dn[0]));
  sys_checker #(.R(2),  .S(16), .D(16)) u1 (.clk, .checks(c[1]), .failures(f[1]), .done(dn[1]));
  sys_checker #(.R(3),  .S(16), .D(8))  u2 (.clk, .checks(c[2]), .failures(f[2]), .done(dn[2]));
  sys_checker #(.R(4),  .S(15), .D(5))  u3 (.clk, .checks(c[3]), .failures(f[3]), .done(dn[3]));
  sys_checker #(.R(5),  .S(16), .D(4))  u4 (.clk, .checks(c[4]), .failures(f[4]), .done(dn[4]));
  sys_checker #(.R(6),  .S(15), .D(3))  u5 (.clk, .checks(c[5]), .failures(f[5]), .done(dn[5]));
  sys_checker #(.R(7),  .S(18), .D(3))  u6 (.clk, .checks(c[6]), .failures(f[6]), .done(dn[6]));
  sys_checker #(.R(8),  .S(14), .D(2))  u7 (.clk, .checks(c[7]), .failures(f[7]), .done(dn[7]));
  sys_checker #(.R(9),  .S(16), .D(2))  u8 (.clk, .checks(c[8]), .failures(f[8]), .done(dn[8]));
  sys_checker #(.R(15), .S(14), .D(1))  u9 (.clk, .checks(c[9]), .failures(f[9]), .done(dn[9]));
  sys_checker #(.R(16), .S(15), .D(1))  u10 (.clk, .checks(c[10]), .failures(f[10]), .done(dn[10]));

  task automatic report(input int extra);
    tc = 0; tf = extra;
    for (int i = 0; i < NC; i++) begin tc += c[i]; tf += f[i]; end
    for (int i = 0; i < NC; i++) begin
      tc++;
      if (c[i] < 400) begin tf++; $display("config %0d made only %0d checks", i, c[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
  endtask

  initial begin
    fork
      begin
        repeat (20000) @(posedge clk);
        report(1);
        $finish;
      end
      begin
        do begin
          @(posedge clk);
          all_done = 1;
          for (int i = 0; i < NC; i++) if (!dn[i]) all_done = 0;
        end while (!all_done);
        #2;
        report(0);
        $finish;
      end
    join_any
  end
endmodule
