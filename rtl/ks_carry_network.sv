// ks_carry_network: Kogge-Stone parallel-prefix carry network over the digits
// of one group.
//
// Each digit contributes a (generate, propagate) pair (CG, CP). Level l of the
// network combines every position j with position j - 2^l using the usual
// prefix operator (G, P) o (G', P') = (G + P.G', P.P'), so after
// ceil(log2(GROUP_DIGITS)) levels position j holds the group generate and
// propagate of digits 0..j. The group carry in enters only at the end:
// carry[j] = G[0..j] + P[0..j].cin, the decimal carry out of digit j.
// The document chooses Kogge-Stone by name; the structure is the standard one.
// Interface: pg (per digit), cin; carry (carry out of each digit).
// Timing: combinational.
module ks_carry_network
  import bcd_pkg::*;
#(
  parameter int unsigned GROUP_DIGITS = 4
) (
  input  digit_pg_t [GROUP_DIGITS-1:0] pg,
  input  logic                         cin,
  output logic      [GROUP_DIGITS-1:0] carry
);

  localparam int unsigned LEVELS = (GROUP_DIGITS > 1) ? $clog2(GROUP_DIGITS) : 0;

  // gl[l] / pl[l]: prefix generate / propagate after l levels.
  logic [GROUP_DIGITS-1:0] gl [LEVELS+1];
  logic [GROUP_DIGITS-1:0] pl [LEVELS+1];

  for (genvar j = 0; j < GROUP_DIGITS; j++) begin : g_in
    assign gl[0][j] = pg[j].cg;
    assign pl[0][j] = pg[j].cp;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar j = 0; j < GROUP_DIGITS; j++) begin : g_node
      if (j >= (1 << l)) begin : g_op
        assign gl[l+1][j] = gl[l][j] | (pl[l][j] & gl[l][j - (1 << l)]);
        assign pl[l+1][j] = pl[l][j] & pl[l][j - (1 << l)];
      end else begin : g_buf
        assign gl[l+1][j] = gl[l][j];
        assign pl[l+1][j] = pl[l][j];
      end
    end
  end

  assign carry = gl[LEVELS] | (pl[LEVELS] & {GROUP_DIGITS{cin}});

endmodule : ks_carry_network
