// addr_counters: the dual mod (W+S+D) address counter of the survivor memory.
//
// wr_addr counts up by one at the end of each enabled write cycle
// (wrrd_n high); rd_addr counts down by one at the end of each enabled read
// cycle (wrrd_n low).  Both wrap modulo DEPTH = W+S+D.  The memory address is
// wr_addr during a write and rd_addr during a read.  Because r+w periods hold
// r reads per write and S+D = r*W, the write, trace-back and data areas of
// the memory rotate through the address space by W words per trace-back
// cycle without ever overlapping.
//
// Reset: wr_addr = 0, rd_addr = DEPTH-1, so the first cycle writes address 0
// and the reads that follow run DEPTH-1, DEPTH-2, ...
// All of this follows the source's counter description and timing diagram.
module addr_counters #(
  parameter int unsigned DEPTH = 24,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          wrrd_n,
  output logic [AW-1:0] wr_addr,
  output logic [AW-1:0] rd_addr,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr <= '0;
      rd_addr <= AW'(DEPTH - 1);
    end else if (en) begin
      if (wrrd_n)
        wr_addr <= (wr_addr == AW'(DEPTH - 1)) ? '0 : wr_addr + 1'b1;
      else
        rd_addr <= (rd_addr == '0) ? AW'(DEPTH - 1) : rd_addr - 1'b1;
    end
  end

  assign addr = wrrd_n ? wr_addr : rd_addr;

endmodule
