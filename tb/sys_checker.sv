// sys_checker: runs one viterbi_top of the given sizes with its channel
// looped back, random data and no channel errors, and checks that every bit
// comes back exactly 2D+S+1 periods (W+S+D survivor writes plus one period of
// encoder / serial-to-parallel) after it was sent.
module sys_checker #(
  parameter int R = 5,
  parameter int S = 16,
  parameter int D = 4,
  parameter int NBITS = 500
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LAT = 2 * D + S + 1;
  logic rst = 1, en = 1, txdata = 0, tx_coded;
  logic [15:0] errorcnt;
  logic rxdata, rxvalid;
  logic tx [NBITS];
  int p;

  viterbi_top #(.R(R), .S(S), .D(D)) dut (
    .clk, .rst, .en, .txdata, .tx_coded, .rx_coded(tx_coded),
    .errorctrl(4'd0), .errorcnt, .rxdata, .rxvalid
  );

  initial begin
    checks = 0; failures = 0; done = 0; p = 0;
    for (int i = 0; i < NBITS; i++) tx[i] = 1'($urandom);
    @(posedge clk); #1 rst = 0;
    txdata = tx[0];
    while (p < NBITS + LAT) begin
      #1;
      if (rxvalid && p >= LAT) begin
        checks++;
        if (rxdata !== tx[p - LAT]) begin
          failures++;
          $display("R=%0d S=%0d D=%0d period %0d: decoded %0b sent %0b", R, S, D, p, rxdata, tx[p - LAT]);
        end
      end
      @(posedge clk);
      if (dut.wrrd_n) p++;
      #1;
      txdata = (p < NBITS) ? tx[p] : 1'b0;
    end
    done = 1;
  end
endmodule
