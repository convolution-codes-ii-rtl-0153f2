// tb_out_shift_reg: runs the output register in the real schedule of the
// default decoder (periods of 1 write + 5 reads, savedata on the last 4 reads
// of every 4th period).  Bits saved newest first must leave on dataout in the
// reverse (time) order, one per write cycle, and dataout must be low outside
// write cycles.
module tb_out_shift_reg;
  localparam int D = 4;
  logic clk = 0, rst = 1, en = 1, wrrd_n = 0, savedata = 0, d = 0;
  logic [D-1:0] a;
  logic dataout;
  int checks = 0, failures = 0;
  logic q [$];
  logic exp;
  int nout;

  out_shift_reg #(.D(D)) dut (.clk, .rst, .en, .wrrd_n, .savedata, .d, .a, .dataout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic grp [D];
    nout = 0;
    @(posedge clk); #1 rst = 0;
    for (int per = 0; per < 400; per++) begin
      for (int c = 0; c < 6; c++) begin
        wrrd_n = (c == 0);
        savedata = (per % 4 == 3) && (c >= 2);
        d = 1'($urandom);
        if (savedata) grp[c - 2] = d;      // newest first
        #1;
        if (wrrd_n) begin
          if (per >= 4) begin
            exp = q.pop_front();
            checks++;
            if (dataout !== exp) begin failures++; $display("period %0d dataout %0b expected %0b", per, dataout, exp); end
            nout++;
          end
        end else begin
          checks++;
          if (dataout !== 1'b0) begin failures++; $display("dataout high in a read cycle"); end
        end
        @(posedge clk); #1;
      end
      if (per % 4 == 3)
        for (int k = D - 1; k >= 0; k--) q.push_back(grp[k]);   // oldest first
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
