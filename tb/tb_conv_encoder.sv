// tb_conv_encoder: drives random data once per r+w period and checks the code
// symbol (z1 = x^s1^s0, z0 = x^s0, computed here from a private shift
// register) and the serial order on the channel: z1 on counts 1..3, z0 on
// counts 4, 5 and the following count 0.
module tb_conv_encoder;
  import viterbi_pkg::*;
  localparam int RW = 6;
  logic clk = 0, rst = 1, en = 1;
  logic [2:0] count = 0;
  logic txdata = 0, tx_serial;
  symbol_t symbol;
  state_t state;
  int checks = 0, failures = 0;
  logic [2:0] sh;          // {x, s1, s0}
  logic ez1, ez0;

  conv_encoder #(.RW(RW)) dut (.clk, .rst, .en, .count, .txdata, .tx_serial, .symbol, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    sh = 0; ez1 = 0; ez0 = 0;
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 300; k++) begin
      for (int c = 0; c < RW; c++) begin
        count = 3'(c);
        if (c == 0) txdata = 1'($urandom);
        #1;
        if (c == 0) chk(tx_serial, ez0, "z0 at count 0");
        else chk(tx_serial, (c <= 3) ? ez1 : ez0, "serial bit");
        @(posedge clk);
        if (c == 0) begin
          sh  = {txdata, sh[2:1]};
          ez1 = sh[2] ^ sh[1] ^ sh[0];
          ez0 = sh[2] ^ sh[0];
        end
        #1;
        if (c == 0) begin
          chk(symbol[1], ez1, "z1");
          chk(symbol[0], ez0, "z0");
          chk(state == sh[2:1], 1'b1, "state");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
