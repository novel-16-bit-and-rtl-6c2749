// hs_bcd_adder: NDIGITS-digit High Speed BCD adder built from groups.
//
// The operands are cut into NDIGITS / GROUP_DIGITS groups (bcd_group_adder).
// Every group does its binary adds, analysis, Kogge-Stone digit carries and
// correction in parallel; only the group carry moves from group to group, each
// time through one group CLA. With 16 digits (64 bits, the document's smaller
// size) that is four group-CLA steps for 16-bit groups and two for 32-bit
// groups, which is where the larger group gains its speed.
// Defaults: NDIGITS = 16 (64-bit operands) and GROUP_DIGITS = 4 (16-bit group);
// the document also evaluates NDIGITS = 32 and GROUP_DIGITS = 8. How the groups
// join (group carry handed on directly) is this design's reading.
// Interface: a, b (BCD, digit 0 in bits 3:0), cin; sum, cout.
// Timing: combinational. NDIGITS must be a multiple of GROUP_DIGITS.
module hs_bcd_adder #(
  parameter int unsigned NDIGITS      = 16,
  parameter int unsigned GROUP_DIGITS = 4
) (
  input  logic [4*NDIGITS-1:0] a,
  input  logic [4*NDIGITS-1:0] b,
  input  logic                 cin,
  output logic [4*NDIGITS-1:0] sum,
  output logic                 cout
);

  localparam int unsigned NGROUPS = NDIGITS / GROUP_DIGITS;
  localparam int unsigned GBITS   = 4 * GROUP_DIGITS;

  if (NGROUPS * GROUP_DIGITS != NDIGITS) begin : g_bad_size
    $error("hs_bcd_adder: NDIGITS must be a multiple of GROUP_DIGITS");
  end

  logic [NGROUPS:0] gcarry;  // carry into each group
  logic [NGROUPS:0] gp;      // P of the top digit of the group below
                             // (the top group's P has no consumer)

  assign gcarry[0] = cin;
  assign gp[0]     = 1'b0;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_group
    bcd_group_adder #(.GROUP_DIGITS(GROUP_DIGITS)) u_group (
      .a    (a[GBITS*g +: GBITS]),
      .b    (b[GBITS*g +: GBITS]),
      .cin  (gcarry[g]),
      .pp_in(gp[g]),
      .sum  (sum[GBITS*g +: GBITS]),
      .cout (gcarry[g+1]),
      .p_top(gp[g+1])
    );
  end

  assign cout = gcarry[NGROUPS];

endmodule : hs_bcd_adder
