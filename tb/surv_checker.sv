// surv_checker: drives one survivor_unit with random came_from words in the
// 1-write / R-read schedule (with random en stalls) and compares its output
// with a reference trace-back computed here from the history of written
// words.  Trace-back m starts from state 00 at the word of write W*m-1 and
// its data bits are those of writes W*m-S-D .. W*m-S-D+W-1; they must leave,
// oldest first, in writes W*m+W .. W*m+2W-1 (latency W+S+D writes).
module surv_checker #(
  parameter int R = 5,
  parameter int S = 16,
  parameter int D = 4,
  parameter int NWRITES = 400
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int W = D;
  logic rst = 1, en = 0, wrrd_n = 0;
  logic [3:0] came_from = 0;
  logic dataout, dout_valid;
  logic [3:0] hist [NWRITES];
  int q, c;

  survivor_unit #(.R(R), .S(S), .D(D)) dut (
    .clk, .rst, .en, .wrrd_n, .came_from, .dataout, .dout_valid
  );

  function automatic logic ref_bit(input int qw);
    int m, j, t, t0;
    logic [1:0] st;
    m = qw / W - 1; j = qw % W;
    t = W * m - S - D + j;
    t0 = W * m - 1;
    st = 0;
    for (int tt = t0; tt > t; tt--) st = {st[0], hist[tt][st]};
    return st[1];
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    q = 0; c = 0;
    @(posedge clk); #1 rst = 0;
    while (q < NWRITES) begin
      en = ($urandom_range(0, 9) != 0);
      wrrd_n = (c == 0);
      if (wrrd_n) came_from = 4'($urandom);
      #1;
      if (en && wrrd_n) begin
        hist[q] = came_from;
        checks++;
        if (dout_valid !== 1'b1) failures++;
        if (q / W - 1 >= (S + D + W - 1) / W) begin
          checks++;
          if (dataout !== ref_bit(q)) begin
            failures++;
            $display("R=%0d S=%0d D=%0d write %0d: dataout %0b expected %0b", R, S, D, q, dataout, ref_bit(q));
          end
        end
      end else if (!wrrd_n) begin
        checks++;
        if (dataout !== 1'b0) failures++;
      end
      @(posedge clk); #1;
      if (en) begin
        if (wrrd_n) q++;
        c = (c == R) ? 0 : c + 1;
      end
    end
    done = 1;
  end
endmodule
