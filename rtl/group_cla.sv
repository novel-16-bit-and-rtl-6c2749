// group_cla: carry lookahead that forms a group's carry out (the carry passed
// to the next group) straight from the group carry in.
//
// The document's nested form for a 4-digit group is
//   C(i+4) = CG(i+4) + P(i+4).(CG(i+3) + P(i+3).(CG(i+2) + P(i+2).(CG(i+1) + P(i+1).Ci)))
// with P (low sum bits 9..15) as the propagate term. P is a valid propagate
// here: whenever P is set without CG the digit sum is exactly 9. For the 8-digit
// (32-bit) group the same nesting is continued over eight digits, which is this
// design's reading of the pattern. The loop below unrolls into that nested
// AND-OR chain, written flat as a sum of products.
// Interface: pg (per digit), cin; cout. Timing: combinational.
module group_cla
  import bcd_pkg::*;
#(
  parameter int unsigned GROUP_DIGITS = 4
) (
  input  digit_pg_t [GROUP_DIGITS-1:0] pg,
  input  logic                         cin,
  output logic                         cout
);

  always_comb begin
    logic prop;
    // Sum of products: term k is CG(k) ANDed with P of every digit above k;
    // the last term is the carry in ANDed with every P.
    cout = 1'b0;
    prop = 1'b1;
    for (int k = GROUP_DIGITS - 1; k >= 0; k--) begin
      cout = cout | (prop & pg[k].cg);
      prop = prop & pg[k].p;
    end
    cout = cout | (prop & cin);
  end

endmodule : group_cla
