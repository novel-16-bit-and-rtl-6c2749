// bcd_pkg: types shared by the High Speed BCD adder blocks.
//
// A BCD digit is four bits holding 0..9. After the first-stage binary add of
// two digits, each digit is summarised by three analyzer signals:
//   cg - carry generate: the digit pair sums to 10 or more, so a decimal
//        carry leaves the digit whatever its carry in;
//   cp - carry propagate: the pair may pass an incoming carry on (sum of 9);
//   p  - the low four sum bits are 9 or more (used by the group lookahead
//        and by the carry suppressor).
// The struct packing of these three signals is a choice of this design.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;

  typedef struct packed {
    logic cg;
    logic cp;
    logic p;
  } digit_pg_t;

endpackage : bcd_pkg
