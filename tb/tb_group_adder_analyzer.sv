// tb_group_adder_analyzer: checks the first stage of a 16-bit group (4 digits)
// and a 32-bit group (8 digits). For random BCD operands each digit's Sum(3:0)
// must be (a+b) mod 16 and the analyzer flags must match the digit sum.
module tb_group_adder_analyzer;
  import bcd_pkg::*;
  import bcd_ref_pkg::*;

  logic      [15:0] a4, b4, s4;
  digit_pg_t [3:0]  pg4;
  logic      [31:0] a8, b8, s8;
  digit_pg_t [7:0]  pg8;
  int checks = 0, failures = 0;

  group_adder_analyzer #(.GROUP_DIGITS(4)) dut4 (.a(a4), .b(b4), .bin_sum(s4), .pg(pg4));
  group_adder_analyzer #(.GROUP_DIGITS(8)) dut8 (.a(a8), .b(b8), .bin_sum(s8), .pg(pg8));

  task automatic check_digit(logic [3:0] da, logic [3:0] db, logic [3:0] got_s, digit_pg_t got_pg);
    int s = da + db;
    checks++;
    if (got_s !== 4'(s) || got_pg.cg !== (s >= 10) || got_pg.p !== (s >= 9 && s <= 15) ||
        (s == 9 && got_pg.cp !== 1'b1)) begin
      failures++;
      $display("FAIL %0d+%0d: sum %0d cg %0b cp %0b p %0b", da, db, got_s, got_pg.cg, got_pg.cp, got_pg.p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic bcd_num_t ra = rand_bcd(8);
      bcd_num_t rb = rand_partner(ra, 8, 30);
      a4 = ra[15:0]; b4 = rb[15:0];
      a8 = ra[31:0]; b8 = rb[31:0];
      #1;
      for (int d = 0; d < 4; d++) check_digit(a4[4*d +: 4], b4[4*d +: 4], s4[4*d +: 4], pg4[d]);
      for (int d = 0; d < 8; d++) check_digit(a8[4*d +: 4], b8[4*d +: 4], s8[4*d +: 4], pg8[d]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
