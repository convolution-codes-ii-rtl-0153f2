// tb_rw_counter: checks the master mod (r+w) counter against a simple model:
// count sequence 0..RW-1, hold while en is low, wrrd_n only at count 0.
module tb_rw_counter;
  localparam int RW = 6;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] count;
  logic wrrd_n;
  int checks = 0, failures = 0;
  int model;

  rw_counter #(.RW(RW)) dut (.clk, .rst, .en, .count, .wrrd_n);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0; model = 0;
    for (int i = 0; i < 400; i++) begin
      en = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (count != 3'(model) || wrrd_n != (model == 0)) begin
        failures++;
        $display("mismatch cycle %0d: count=%0d model=%0d wrrd_n=%0b", i, count, model, wrrd_n);
      end
      @(posedge clk);
      if (en) model = (model + 1) % RW;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
