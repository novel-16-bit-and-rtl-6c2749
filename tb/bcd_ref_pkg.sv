// bcd_ref_pkg: reference arithmetic for the testbenches.
//
// bcd_add adds two packed BCD numbers of n digits digit by digit in integer
// arithmetic (d = a + b + carry; carry = d > 9; digit = d mod 10), which is
// independent of the generate/propagate structure of the adder under test.
// rand_bcd draws a random packed BCD number; digits are biased toward 0, 9 and
// values whose pair sums land near 9 so that carry chains appear often.
package bcd_ref_pkg;

  localparam int unsigned MAXD = 32;
  typedef logic [4*MAXD-1:0] bcd_num_t;

  function automatic bcd_num_t bcd_add(bcd_num_t a, bcd_num_t b, logic cin,
                                       int unsigned n, output logic cout);
    bcd_num_t s = '0;
    int unsigned c = 32'(cin);
    for (int unsigned i = 0; i < n; i++) begin
      int unsigned d = 32'(a[4*i +: 4]) + 32'(b[4*i +: 4]) + c;
      c = (d > 9) ? 1 : 0;
      s[4*i +: 4] = 4'(d % 10);
    end
    cout = c[0];
    return s;
  endfunction

  function automatic logic [3:0] rand_digit();
    int unsigned r = $urandom_range(0, 9);
    case ($urandom_range(0, 3))
      0:       return 4'(r);
      1:       return 4'd9;
      2:       return 4'd0;
      default: return 4'($urandom_range(4, 5));
    endcase
  endfunction

  function automatic bcd_num_t rand_bcd(int unsigned n);
    bcd_num_t x = '0;
    for (int unsigned i = 0; i < n; i++) x[4*i +: 4] = rand_digit();
    return x;
  endfunction

  // Second operand that makes digit i of a+b exactly 9 with probability pct%.
  function automatic bcd_num_t rand_partner(bcd_num_t a, int unsigned n, int unsigned pct);
    bcd_num_t x = '0;
    for (int unsigned i = 0; i < n; i++)
      x[4*i +: 4] = ($urandom_range(0, 99) < pct) ? 4'(9 - a[4*i +: 4]) : 4'($urandom_range(0, 9));
    return x;
  endfunction

endpackage : bcd_ref_pkg
