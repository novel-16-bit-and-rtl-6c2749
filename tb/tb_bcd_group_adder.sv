// tb_bcd_group_adder: a 16-bit group (4 digits) and a 32-bit group (8 digits)
// add random BCD operands, with a carry in, against digit-by-digit decimal
// addition. Also checks the group carry out and the P of the top digit, and
// drives the all-nines pattern where a carry in runs through every digit.
module tb_bcd_group_adder;
  import bcd_ref_pkg::*;

  logic [15:0] a4, b4, s4;
  logic [31:0] a8, b8, s8;
  logic cin, pp_in, co4, co8, pt4, pt8;
  int checks = 0, failures = 0;

  bcd_group_adder #(.GROUP_DIGITS(4)) dut4 (.a(a4), .b(b4), .cin(cin), .pp_in(pp_in),
                                            .sum(s4), .cout(co4), .p_top(pt4));
  bcd_group_adder #(.GROUP_DIGITS(8)) dut8 (.a(a8), .b(b8), .cin(cin), .pp_in(pp_in),
                                            .sum(s8), .cout(co8), .p_top(pt8));

  task automatic run(bcd_num_t ra, bcd_num_t rb, logic c);
    bcd_num_t e4, e8;
    logic ec4, ec8;
    int top4, top8;
    a4 = ra[15:0]; b4 = rb[15:0]; a8 = ra[31:0]; b8 = rb[31:0];
    cin = c; pp_in = 1'($urandom);
    #1;
    e4 = bcd_add(ra, rb, c, 4, ec4);
    e8 = bcd_add(ra, rb, c, 8, ec8);
    top4 = ra[15:12] + rb[15:12];
    top8 = ra[31:28] + rb[31:28];
    checks += 2;
    if (s4 !== e4[15:0] || co4 !== ec4 || pt4 !== (top4 >= 9 && top4 <= 15)) begin
      failures++;
      $display("FAIL4 %h+%h+%b got %b_%h exp %b_%h", a4, b4, c, co4, s4, ec4, e4[15:0]);
    end
    if (s8 !== e8[31:0] || co8 !== ec8 || pt8 !== (top8 >= 9 && top8 <= 15)) begin
      failures++;
      $display("FAIL8 %h+%h+%b got %b_%h exp %b_%h", a8, b8, c, co8, s8, ec8, e8[31:0]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run('h99999999, 'h0, 1'b1);
    run('h45454545, 'h54545454, 1'b1);
    run('h99999999, 'h99999999, 1'b1);
    run('h0, 'h0, 1'b0);
    for (int t = 0; t < 5000; t++) begin
      automatic bcd_num_t ra = rand_bcd(8);
      run(ra, rand_partner(ra, 8, 50), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
