// tb_hs_bcd_adder: the four configurations the adder is evaluated in
// (64-bit and 128-bit operands, 16-bit and 32-bit groups) add random and
// directed BCD operands against digit-by-digit decimal addition.
module tb_hs_bcd_adder;
  import bcd_ref_pkg::*;

  logic [63:0]  a64, b64, s64_g4, s64_g8;
  logic [127:0] a128, b128, s128_g4, s128_g8;
  logic cin, c64_g4, c64_g8, c128_g4, c128_g8;
  int checks = 0, failures = 0;

  hs_bcd_adder #(.NDIGITS(16), .GROUP_DIGITS(4)) d64_g4 (.a(a64), .b(b64), .cin(cin), .sum(s64_g4), .cout(c64_g4));
  hs_bcd_adder #(.NDIGITS(16), .GROUP_DIGITS(8)) d64_g8 (.a(a64), .b(b64), .cin(cin), .sum(s64_g8), .cout(c64_g8));
  hs_bcd_adder #(.NDIGITS(32), .GROUP_DIGITS(4)) d128_g4 (.a(a128), .b(b128), .cin(cin), .sum(s128_g4), .cout(c128_g4));
  hs_bcd_adder #(.NDIGITS(32), .GROUP_DIGITS(8)) d128_g8 (.a(a128), .b(b128), .cin(cin), .sum(s128_g8), .cout(c128_g8));

  task automatic cmp(string name, logic [127:0] got, logic gc, logic [127:0] exp, logic ec, int bits);
    checks++;
    if (got !== exp || gc !== ec) begin
      failures++;
      $display("FAIL %s got %b_%h exp %b_%h", name, gc, got, ec, exp);
    end
  endtask

  task automatic run(bcd_num_t ra, bcd_num_t rb, logic c);
    bcd_num_t e16, e32;
    logic ec16, ec32;
    a64 = ra[63:0]; b64 = rb[63:0]; a128 = ra; b128 = rb; cin = c;
    #1;
    e16 = bcd_add(ra, rb, c, 16, ec16);
    e32 = bcd_add(ra, rb, c, 32, ec32);
    cmp("64/g16", 128'(s64_g4), c64_g4, {64'b0, e16[63:0]}, ec16, 64);
    cmp("64/g32", 128'(s64_g8), c64_g8, {64'b0, e16[63:0]}, ec16, 64);
    cmp("128/g16", s128_g4, c128_g4, e32, ec32, 128);
    cmp("128/g32", s128_g8, c128_g8, e32, ec32, 128);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bcd_num_t nines = '0;
    for (int i = 0; i < 32; i++) nines[4*i +: 4] = 4'd9;
    run(nines, '0, 1'b1);
    run(nines, nines, 1'b1);
    run(nines, '0, 1'b0);
    run('0, '0, 1'b1);
    for (int t = 0; t < 3000; t++) begin
      automatic bcd_num_t ra = rand_bcd(32);
      run(ra, rand_partner(ra, 32, $urandom_range(0, 95)), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
