// tb_viterbi_top: end-to-end test of the whole system at its default sizes,
// with tx_coded looped back to rx_coded.
//
// Phases (reset between them):
//   a) all 0s, b) all 1s, c) 00000 then 1s, d) 8 zeros / 8 ones alternating,
//   e) 0101..., f) random data            - no channel errors, every decoded
//                                           bit must equal the bit sent 25
//                                           periods earlier;
//   g) random data with random en stalls  - same check;
//   h) random data, errorctrl = 6 (about 1/64 per clock)
//                                         - errorcnt must equal the flips the
//                                           decoder really sampled, and the
//                                           decoded error rate must be well
//                                           below the channel error rate.
// Mechanisms counted and required at least once: survivor writes and reads,
// trace-back restarts, data-region reads (savedata), write- and read-address
// wrap-around, path-metric wrap-around (overflow handled by the subtraction
// compare), sampled channel errors, en stalls.
module tb_viterbi_top;
  localparam int LAT = 25;
  localparam int NMAX = 20000;
  logic clk = 0, rst = 1, en = 1, txdata = 0, tx_coded, rx_coded;
  logic [3:0] errorctrl = 0;
  logic [15:0] errorcnt;
  logic rxdata, rxvalid;
  int checks = 0, failures = 0;
  logic tx [NMAX];
  int p, nbits, out_err, sampled_flips;
  int n_wr, n_rd, n_restart, n_save, n_wwrap, n_rwrap, n_hwrap, n_stall;
  logic [3:0] h_msb_q;

  viterbi_top dut (
    .clk, .rst, .en, .txdata, .tx_coded, .rx_coded,
    .errorctrl, .errorcnt, .rxdata, .rxvalid
  );

  assign rx_coded = tx_coded;   // loopback

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors.
  always @(posedge clk) if (!rst) begin
    if (en && dut.wrrd_n) n_wr++;
    if (en && !dut.wrrd_n) n_rd++;
    if (en && dut.u_dec.u_surv.end_of_d) n_restart++;
    if (en && dut.u_dec.u_surv.savedata) n_save++;
    if (en && dut.wrrd_n && dut.u_dec.u_surv.wr_addr == 5'd23) n_wwrap++;
    if (en && !dut.wrrd_n && dut.u_dec.u_surv.rd_addr == 5'd0) n_rwrap++;
    if (!en) n_stall++;
    for (int s = 0; s < 4; s++)
      if (h_msb_q[s] && !dut.u_dec.u_acs.h[s][5]) n_hwrap++;
    if (en && dut.sample && (dut.rx_bit != rx_coded)) sampled_flips++;
  end
  always @(posedge clk)
    for (int s = 0; s < 4; s++) h_msb_q[s] <= dut.u_dec.u_acs.h[s][5];

  task automatic run(input string name, input int n, input int ectrl, input bit stall, input bit exact);
    rst = 1; errorctrl = 4'(ectrl); en = 1;
    @(posedge clk); #1 rst = 0;
    p = 0; out_err = 0; nbits = 0;
    sampled_flips = 0;
    txdata = tx[0];
    while (p < n + LAT) begin
      en = stall ? ($urandom_range(0, 4) != 0) : 1'b1;
      #1;
      if (rxvalid && p >= LAT) begin
        nbits++;
        if (exact) checks++;
        if (rxdata !== tx[p - LAT]) begin
          out_err++;
          if (exact) failures++;
          if (exact) $display("%s: period %0d decoded %0b sent %0b", name, p, rxdata, tx[p - LAT]);
        end
      end
      @(posedge clk);
      if (en && dut.wrrd_n) p++;
      #1;
      txdata = (p < n) ? tx[p] : 1'b0;
    end
    if (exact) begin
      checks++;
      if (nbits != n) begin
        failures++;
        $display("%s: %0d decoding errors in %0d bits", name, out_err, nbits);
      end
    end
    $display("%s: %0d bits, %0d decoded errors, %0d channel errors counted", name, nbits, out_err, errorcnt);
  endtask

  initial begin
    n_wr = 0; n_rd = 0; n_restart = 0; n_save = 0; n_wwrap = 0; n_rwrap = 0;
    n_hwrap = 0; n_stall = 0; sampled_flips = 0;
    for (int i = 0; i < 300; i++) tx[i] = 0;
    run("a all 0s", 300, 0, 0, 1);
    for (int i = 0; i < 300; i++) tx[i] = 1;
    run("b all 1s", 300, 0, 0, 1);
    for (int i = 0; i < 300; i++) tx[i] = (i >= 5);
    run("c 00000111..", 300, 0, 0, 1);
    for (int i = 0; i < 320; i++) tx[i] = 1'((i / 8) % 2);
    run("d 8x0 8x1", 320, 0, 0, 1);
    for (int i = 0; i < 300; i++) tx[i] = 1'(i % 2);
    run("e 0101..", 300, 0, 0, 1);
    for (int i = 0; i < 2000; i++) tx[i] = 1'($urandom);
    run("f random", 2000, 0, 0, 1);
    for (int i = 0; i < 1000; i++) tx[i] = 1'($urandom);
    run("g random, en stalls", 1000, 0, 1, 1);
    for (int i = 0; i < NMAX; i++) tx[i] = 1'($urandom);
    run("h random, errorctrl=6", NMAX, 6, 0, 0);
    checks++;
    if (int'(errorcnt) != sampled_flips) begin
      failures++; $display("errorcnt %0d, flips seen by the decoder %0d", errorcnt, sampled_flips);
    end
    checks++;
    // channel bit error rate = errorcnt / (2*nbits); decoded must be far lower
    if (sampled_flips < 200 || out_err * 20 > sampled_flips) begin
      failures++; $display("error correction too weak: %0d decoded errors for %0d channel errors", out_err, sampled_flips);
    end
    $display("mechanisms: writes=%0d reads=%0d restarts=%0d savedata=%0d wr_wrap=%0d rd_wrap=%0d metric_wrap=%0d stalls=%0d sampled_errors=%0d",
             n_wr, n_rd, n_restart, n_save, n_wwrap, n_rwrap, n_hwrap, n_stall, sampled_flips);
    checks++; if (n_wr == 0) failures++;
    checks++; if (n_rd == 0) failures++;
    checks++; if (n_restart == 0) failures++;
    checks++; if (n_save == 0) failures++;
    checks++; if (n_wwrap == 0) failures++;
    checks++; if (n_rwrap == 0) failures++;
    checks++; if (n_hwrap == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (sampled_flips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
