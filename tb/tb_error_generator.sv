// tb_error_generator: checks the pseudorandom error generator.
// 1. The register sequence against a private model of 1 + x^7 + x^18 and the
//    period: the seed recurs after exactly 2^18 - 1 shifts and not before.
// 2. Over one full period with errorctrl = 6 the error line is high exactly
//    2^12 times (every non-zero 18-bit state occurs once), i.e. a rate of 1/64.
// 3. errorctrl = 0 gives no errors; rx_out = rx_in ^ err; errorcnt counts
//    exactly the errors that fall on sample cycles; en low freezes it.
module tb_error_generator;
  localparam int LEN = 18;
  localparam int PERIOD = (1 << LEN) - 1;
  logic clk = 0, rst = 1, en = 1;
  logic [3:0] errorctrl = 0;
  logic sample = 0, rx_in = 0, rx_out, err;
  logic [15:0] errorcnt;
  int checks = 0, failures = 0;
  logic [LEN:1] model;
  int nerr, nsampled, first_repeat;

  error_generator dut (.clk, .rst, .en, .errorctrl, .sample, .rx_in, .rx_out, .err, .errorcnt);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * PERIOD) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_model();
    model = {model[LEN-1:1], model[7] ^ model[LEN]};
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    model = LEN'(1);
    // 1 + 2: full period, errorctrl = 6, sample always high.
    errorctrl = 6; sample = 1;
    nerr = 0; first_repeat = -1;
    for (int i = 0; i < PERIOD; i++) begin
      rx_in = 1'($urandom);
      #1;
      if (i % 997 == 0) begin
        checks++;
        if (dut.sr !== model) begin failures++; $display("state mismatch at %0d", i); end
        checks++;
        if (rx_out !== (rx_in ^ err)) begin failures++; $display("rx_out wrong"); end
      end
      if (err) nerr++;
      @(posedge clk); #1;
      step_model();
      if (dut.sr == LEN'(1) && first_repeat < 0) first_repeat = i + 1;
    end
    checks++;
    if (first_repeat != PERIOD) begin
      failures++; $display("period %0d expected %0d", first_repeat, PERIOD);
    end
    checks++;
    if (nerr != (1 << (LEN - 6))) begin
      failures++; $display("errors in one period %0d expected %0d", nerr, 1 << (LEN - 6));
    end
    checks++;
    if (errorcnt !== 16'(nerr)) begin
      failures++; $display("errorcnt %0d expected %0d", errorcnt, nerr);
    end
    // 3: random sampling, random errorctrl, en toggling.
    rst = 1; @(posedge clk); #1 rst = 0;
    nsampled = 0;
    for (int i = 0; i < 40000; i++) begin
      if (i % 5000 == 0) errorctrl = 4'($urandom_range(0, 5));
      sample = 1'($urandom);
      en = ($urandom_range(0, 9) != 0);
      #1;
      if (errorctrl == 0) begin
        checks++;
        if (err) begin failures++; $display("error with errorctrl=0"); end
      end
      if (en && sample && err) nsampled++;
      @(posedge clk); #1;
    end
    checks++;
    if (errorcnt !== 16'(nsampled)) begin
      failures++; $display("sampled errorcnt %0d expected %0d", errorcnt, nsampled);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
