// tb_counter: the mod (S+D) trace-back counter, countTB.
//
// countTB counts down from S+D-1 to 0, one step per enabled read cycle
// (wrrd_n low), and then wraps to S+D-1.  The first S reads of each
// trace-back only bring the path onto the survivor; during the last D
// reads (countTB < D) the decoded bits are valid and savedata is high.
// end_of_d marks the last read of the data region (countTB == 0, during a
// read); the trace-back path restarts after it.
//
// Interface: combinational savedata/end_of_d from the registered count.
// Reset loads S+D-1.  All of this follows the source's counter description.
module tb_counter #(
  parameter int unsigned S = 16,
  parameter int unsigned D = 4,
  localparam int unsigned TW = $clog2(S + D)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          wrrd_n,
  output logic [TW-1:0] count_tb,
  output logic          savedata,
  output logic          end_of_d
);

  always_ff @(posedge clk) begin
    if (rst)
      count_tb <= TW'(S + D - 1);
    else if (en && !wrrd_n)
      count_tb <= (count_tb == '0) ? TW'(S + D - 1) : count_tb - 1'b1;
  end

  assign savedata = !wrrd_n && (count_tb < TW'(D));
  assign end_of_d = !wrrd_n && (count_tb == '0);

endmodule
