// cla4_adder: first-stage 4-bit carry-lookahead binary adder of one BCD digit pair.
//
// The two digits are added in plain binary with no carry input, so this stage
// never waits on the carry of a lower digit; the result is a 5-bit value 0..18
// split into sum[3:0] and cout. Bit generate g = a&b and propagate p = a^b feed
// a flat lookahead that forms every internal carry directly from g and p.
// The document names a CLA adder here and states that it takes no carry in;
// the lookahead equations themselves are the textbook ones.
// Interface: a, b (BCD digits), sum, cout. Timing: purely combinational.
module cla4_adder (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] sum,
  output logic       cout
);

  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = 1'b0;
    c[1] = g[0];
    c[2] = g[1] | (p[1] & g[0]);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    sum  = p ^ c[3:0];
    cout = c[4];
  end

endmodule : cla4_adder
