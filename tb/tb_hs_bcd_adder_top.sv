// tb_hs_bcd_adder_top: end-to-end test of both 64-bit adders (16-bit groups and
// 32-bit groups) at their default size. Random and directed BCD operands are
// added and both results are compared with digit-by-digit decimal addition.
// From the operands alone it counts how often each mechanism of the adder was
// exercised, and counts a failure for any that never occurred:
//   digit carry generated (pair sum >= 10), carry propagated through a digit
//   (pair sum 9 with a carry in), each correction value 0, 1, 6 and 7, the
//   Pn.Pp.Cp term of the carry suppressor, a carry crossing a 16-bit and a
//   32-bit group boundary, a carry running through a whole group, a carry in,
//   and a decimal overflow out of the top digit.
module tb_hs_bcd_adder_top;
  import bcd_ref_pkg::*;

  localparam int ND = 16;

  logic [4*ND-1:0] a, b, sum_g16, sum_g32;
  logic cin, cout_g16, cout_g32;
  int checks = 0, failures = 0;

  int n_gen, n_prop, n_corr[4], n_ppp, n_cross16, n_cross32, n_group_run, n_cin, n_ovf;

  hs_bcd_adder_top dut (
    .a(a), .b(b), .cin(cin),
    .sum_g16(sum_g16), .cout_g16(cout_g16),
    .sum_g32(sum_g32), .cout_g32(cout_g32)
  );

  // Tally the mechanisms this addition exercises, from the operands.
  task automatic tally(bcd_num_t ra, bcd_num_t rb, logic c);
    int carry = int'(c);
    int run_len = 0;
    int prev_s = 0;
    if (c) n_cin++;
    for (int i = 0; i < ND; i++) begin
      int s = int'(ra[4*i +: 4]) + int'(rb[4*i +: 4]);
      int cout_d = (s + carry >= 10) ? 1 : 0;
      int corr = 6 * cout_d + carry;
      if (s >= 10) n_gen++;
      if (s == 9 && carry == 1) n_prop++;
      case (corr)
        0: n_corr[0]++;
        1: n_corr[1]++;
        6: n_corr[2]++;
        default: n_corr[3]++;
      endcase
      if (i > 0 && s >= 9 && s <= 15 && prev_s >= 9 && prev_s <= 15 && carry == 1) n_ppp++;
      if (cout_d == 1 && i < ND - 1 && (i % 4) == 3) n_cross16++;
      if (cout_d == 1 && i < ND - 1 && (i % 8) == 7) n_cross32++;
      // a carry entering a 4-digit group and leaving it by propagation alone
      if (s == 9 && carry == 1) run_len++; else run_len = 0;
      if (run_len >= 4 && (i % 4) == 3) n_group_run++;
      carry = cout_d;
      prev_s = s;
    end
    if (carry == 1) n_ovf++;
  endtask

  task automatic run(bcd_num_t ra, bcd_num_t rb, logic c);
    bcd_num_t e;
    logic ec;
    a = ra[4*ND-1:0]; b = rb[4*ND-1:0]; cin = c;
    #1;
    e = bcd_add(ra, rb, c, ND, ec);
    tally(ra, rb, c);
    checks += 2;
    if (sum_g16 !== e[4*ND-1:0] || cout_g16 !== ec) begin
      failures++;
      $display("FAIL g16 %h+%h+%b got %b_%h exp %b_%h", a, b, c, cout_g16, sum_g16, ec, e[4*ND-1:0]);
    end
    if (sum_g32 !== e[4*ND-1:0] || cout_g32 !== ec) begin
      failures++;
      $display("FAIL g32 %h+%h+%b got %b_%h exp %b_%h", a, b, c, cout_g32, sum_g32, ec, e[4*ND-1:0]);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bcd_num_t nines = '0;
    for (int i = 0; i < ND; i++) nines[4*i +: 4] = 4'd9;
    n_gen = 0; n_prop = 0; n_ppp = 0; n_cross16 = 0; n_cross32 = 0;
    n_group_run = 0; n_cin = 0; n_ovf = 0;
    foreach (n_corr[k]) n_corr[k] = 0;

    run(nines, '0, 1'b1);                        // carry through all 16 digits
    run(nines, nines, 1'b0);                     // every digit generates
    run(bcd_num_t'('h0000_0000_0000_0001), nines, 1'b0);     // 9999...9 + 1
    run(bcd_num_t'('h1234_5678_9012_3456), bcd_num_t'('h8765_4321_0987_6543), 1'b0);
    run('0, '0, 1'b0);
    for (int t = 0; t < 20000; t++) begin
      automatic bcd_num_t ra = rand_bcd(ND);
      run(ra, rand_partner(ra, ND, $urandom_range(0, 95)), 1'($urandom));
    end

    $display("mechanism counts:");
    need("digit carry generate", n_gen);
    need("digit carry propagate", n_prop);
    need("correction +0", n_corr[0]);
    need("correction +1", n_corr[1]);
    need("correction +6", n_corr[2]);
    need("correction +7", n_corr[3]);
    need("suppressor Pn.Pp.Cp term", n_ppp);
    need("carry across 16-bit group", n_cross16);
    need("carry across 32-bit group", n_cross32);
    need("carry through whole group", n_group_run);
    need("carry in", n_cin);
    need("decimal overflow out", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
