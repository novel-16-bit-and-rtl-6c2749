// group_adder_analyzer: the "Group Adder and analyzer block" of one group.
//
// For each of the GROUP_DIGITS digit pairs it places one first-stage CLA adder
// (cla4_adder) and one analyzer (digit_analyzer). All digits work in parallel:
// nothing here depends on any carry. GROUP_DIGITS = 4 gives the 16-bit group,
// 8 the 32-bit group, both from the document. The per-digit binary Cout is used
// only inside the analyzer; the later correction works on sum[3:0] modulo 16.
// Interface: a, b (GROUP_DIGITS BCD digits each); bin_sum (Sum(3:0) of each
// digit), pg (analyzer signals per digit). Timing: combinational.
module group_adder_analyzer
  import bcd_pkg::*;
#(
  parameter int unsigned GROUP_DIGITS = 4
) (
  input  logic      [4*GROUP_DIGITS-1:0] a,
  input  logic      [4*GROUP_DIGITS-1:0] b,
  output logic      [4*GROUP_DIGITS-1:0] bin_sum,
  output digit_pg_t [GROUP_DIGITS-1:0]   pg
);

  for (genvar d = 0; d < GROUP_DIGITS; d++) begin : g_digit
    logic cout;

    cla4_adder u_add (
      .a   (a[4*d +: 4]),
      .b   (b[4*d +: 4]),
      .sum (bin_sum[4*d +: 4]),
      .cout(cout)
    );

    digit_analyzer u_pg (
      .sum (bin_sum[4*d +: 4]),
      .cout(cout),
      .pg  (pg[d])
    );
  end

endmodule : group_adder_analyzer
