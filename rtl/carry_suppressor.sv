// carry_suppressor: decides the correction of one digit.
//
// It forms the document's value
//   V = Cn + Pn.Pp.Cp
// (Cn: carry out of this digit from the carry network, Pn: this digit's P,
// Pp: P of the digit below, Cp: carry into this digit) and from it the
// correction to add to the first-stage sum: 6 when V is set (the digit
// overflowed past 9 and must wrap), plus 1 for the incoming carry, which the
// first stage did not add. The correction is therefore 0, 1, 6 or 7, encoded
// as {1'b0, V, V, Cp}. The Pn.Pp.Cp term is kept as printed; when Cn is the
// exact digit carry it is already covered by Cn. corr[3] is always 0 and
// corr[0] is Cp itself; both are kept so the port carries the full value.
// Interface: cn, pn, pp, cp in; corr out (V appears as corr[2] and corr[1]). Timing: combinational.
module carry_suppressor (
  input  logic       cn,
  input  logic       pn,
  input  logic       pp,
  input  logic       cp,
  output logic [3:0] corr
);

  logic v;  // the add-6 decision; corr[2:1] carry it out

  always_comb begin
    v    = cn | (pn & pp & cp);
    corr = {1'b0, v, v, cp};
  end

endmodule : carry_suppressor
