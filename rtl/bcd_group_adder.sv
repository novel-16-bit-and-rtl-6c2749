// bcd_group_adder: one group of the High Speed BCD adder (16-bit group for
// GROUP_DIGITS = 4, 32-bit group for GROUP_DIGITS = 8).
//
// Stage 1: every digit pair is added in binary with no carry in and analysed
//          into CG, CP and P (group_adder_analyzer).
// Stage 2: the group carry in goes to two places only. The group CLA
//          (group_cla) turns it, with the digits' CG and P, into the carry for
//          the next group; the Kogge-Stone network (ks_carry_network) turns it,
//          with CG and CP, into the carry out of every digit. A carry
//          suppressor per digit forms V and the correction value 0/1/6/7.
// Stage 3: the correction is added to each first-stage sum (correction_logic).
// The stages are logic levels; there are no registers.
// Interface: a, b, cin, pp_in (P of the digit below the group, 0 for the
// lowest group); sum, cout (next group's carry), p_top (P of the group's top
// digit, the next group's pp_in).
module bcd_group_adder
  import bcd_pkg::*;
#(
  parameter int unsigned GROUP_DIGITS = 4
) (
  input  logic [4*GROUP_DIGITS-1:0] a,
  input  logic [4*GROUP_DIGITS-1:0] b,
  input  logic                      cin,
  input  logic                      pp_in,
  output logic [4*GROUP_DIGITS-1:0] sum,
  output logic                      cout,
  output logic                      p_top
);

  logic      [4*GROUP_DIGITS-1:0] bin_sum;
  digit_pg_t [GROUP_DIGITS-1:0]   pg;
  logic      [GROUP_DIGITS-1:0]   carry;      // carry out of each digit
  logic      [GROUP_DIGITS-1:0]   carry_in;   // carry into each digit
  logic      [GROUP_DIGITS-1:0]   p_below;    // P of the digit below each digit

  group_adder_analyzer #(.GROUP_DIGITS(GROUP_DIGITS)) u_stage1 (
    .a      (a),
    .b      (b),
    .bin_sum(bin_sum),
    .pg     (pg)
  );

  group_cla #(.GROUP_DIGITS(GROUP_DIGITS)) u_cla (
    .pg  (pg),
    .cin (cin),
    .cout(cout)
  );

  ks_carry_network #(.GROUP_DIGITS(GROUP_DIGITS)) u_ks (
    .pg   (pg),
    .cin  (cin),
    .carry(carry)
  );

  assign carry_in = {carry[GROUP_DIGITS-2:0], cin};
  assign p_top    = pg[GROUP_DIGITS-1].p;

  // The group CLA and the top node of the Kogge-Stone network compute the same
  // carry by two routes (P and CP as propagate); they must agree.
  always_comb begin
    a_carry_agree: assert #0 (cout == carry[GROUP_DIGITS-1])
      else $error("bcd_group_adder: group CLA and carry network disagree");
  end

  for (genvar d = 0; d < GROUP_DIGITS; d++) begin : g_digit
    logic [3:0] corr;

    if (d == 0) begin : g_pp0
      assign p_below[d] = pp_in;
    end else begin : g_ppn
      assign p_below[d] = pg[d-1].p;
    end

    carry_suppressor u_sup (
      .cn  (carry[d]),
      .pn  (pg[d].p),
      .pp  (p_below[d]),
      .cp  (carry_in[d]),
      .corr(corr)
    );

    correction_logic u_cor (
      .bin_sum(bin_sum[4*d +: 4]),
      .corr   (corr),
      .digit  (sum[4*d +: 4])
    );
  end

endmodule : bcd_group_adder
