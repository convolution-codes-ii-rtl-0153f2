// tb_acs_unit: checks the add-compare-select against unbounded integer
// arithmetic.  True metrics are random (up to thousands, far beyond 6 bits)
// with candidate sums less than 32 apart; only their low 6 bits reach the
// unit.  The selected metric must equal the smaller true sum modulo 64 and
// came_from must be 1 exactly when the lower sum is strictly smaller.
module tb_acs_unit;
  localparam int HW = 6;
  logic [HW-1:0] h_up, h_dn, h_new;
  logic [1:0] bm_up, bm_dn;
  logic came_from;
  int checks = 0, failures = 0;
  int tu, td, su, sd, wraps;

  acs_unit #(.HW(HW)) dut (.h_up, .h_dn, .bm_up, .bm_dn, .h_new, .came_from);

  initial begin
    wraps = 0;
    for (int i = 0; i < 20000; i++) begin
      tu = $urandom_range(0, 5000);
      td = tu + $urandom_range(0, 58) - 29;
      if (td < 0) td = 0;
      bm_up = 2'($urandom_range(0, 2));
      bm_dn = 2'($urandom_range(0, 2));
      if (i % 4 == 0) begin td = tu; bm_dn = bm_up; end   // ties
      su = tu + bm_up; sd = td + bm_dn;
      if (su - sd > 31 || sd - su > 31) td = tu;
      su = tu + bm_up; sd = td + bm_dn;
      h_up = HW'(tu); h_dn = HW'(td);
      if ((tu % 64 > td % 64) != (tu > td)) wraps++;
      if ((tu / 64) != (td / 64)) wraps++;
      #1;
      checks++;
      if (came_from !== (sd < su) || h_new !== HW'((sd < su) ? sd : su)) begin
        failures++;
        $display("tu=%0d td=%0d bu=%0d bd=%0d: came_from=%0b h_new=%0d", tu, td, bm_up, bm_dn, came_from, h_new);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrapped comparisons exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
