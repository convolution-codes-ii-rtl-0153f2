// tb_surv_mem: random writes and reads of the 24 x 4 survivor memory against
// an array model; a read shows the addressed word in the same cycle and a
// write lands on the clock edge only when we is high.
module tb_surv_mem;
  localparam int DEPTH = 24;
  logic clk = 0, we = 0;
  logic [4:0] addr = 0;
  logic [3:0] din = 0, dout;
  logic [3:0] model [DEPTH];
  int checks = 0, failures = 0;

  surv_mem #(.DEPTH(DEPTH), .DW(4)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; addr = 5'(a); din = 4'($urandom); model[a] = din;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom);
      addr = 5'($urandom_range(0, DEPTH - 1));
      din = 4'($urandom);
      #1;
      checks++;
      if (dout !== model[addr]) begin
        failures++; $display("addr %0d read %h expected %h", addr, dout, model[addr]);
      end
      @(posedge clk);
      if (we) model[addr] = din;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
