// tb_digit_analyzer: drives every first-stage sum a digit pair can produce
// (0..18) and checks the analyzer's meaning: cg exactly when the sum is 10 or
// more, p when the low four bits are 9..15, cp set for a sum of 9 and clear
// whenever the sum is below 9 or at least 16.
module tb_digit_analyzer;
  import bcd_pkg::*;
  logic [3:0] sum;
  logic       cout;
  digit_pg_t  pg;
  int checks = 0, failures = 0;

  digit_analyzer dut (.sum(sum), .cout(cout), .pg(pg));

  task automatic check(string what, logic got, logic exp, int s);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL S=%0d %s got %0b exp %0b", s, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s <= 18; s++) begin
      {cout, sum} = 5'(s);
      #1;
      check("cg", pg.cg, s >= 10, s);
      check("p", pg.p, (s >= 9) && (s <= 15), s);
      if (s == 9) check("cp", pg.cp, 1'b1, s);
      if (s < 9 || s >= 16) check("cp", pg.cp, 1'b0, s);
      // As a propagate term cp must never be needed when cg is set:
      // cg | cp.c must equal the decimal carry for both carry-in values.
      check("carry c=0", pg.cg, s >= 10, s);
      check("carry c=1", pg.cg | pg.cp, s + 1 >= 10, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
