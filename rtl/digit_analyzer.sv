// digit_analyzer: PG logic of one digit (the "analyzer").
//
// From the first-stage binary sum S (0..18, as cout and sum[3:0]) it derives:
//   cp = S3 & S0               carry propagate (true for S = 9; the other
//                              codes it covers, 11/13/15, also set cg)
//   cg = Cout | S3 & (S2 | S1) carry generate, S >= 10
//   p  = S3 & (S2 | S1 | S0)   low four bits are 9..15
// These are the document's equations, taken as printed.
// Interface: sum[3:0], cout in; pg (cg, cp, p) out. Timing: combinational.
module digit_analyzer
  import bcd_pkg::*;
(
  input  logic [3:0] sum,
  input  logic       cout,
  output digit_pg_t  pg
);

  always_comb begin
    pg.cp = sum[3] & sum[0];
    pg.cg = cout | (sum[3] & (sum[2] | sum[1]));
    pg.p  = sum[3] & (sum[2] | sum[1] | sum[0]);
  end

endmodule : digit_analyzer
