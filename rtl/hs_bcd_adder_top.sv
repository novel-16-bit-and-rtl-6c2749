// hs_bcd_adder_top: the two proposed High Speed BCD adders side by side.
//
// Both add the same NDIGITS-digit BCD operands (64 bits by default). One is
// built from 16-bit groups (4 digits per group), the other from 32-bit groups
// (8 digits per group); their results are equal, their carry paths differ in
// length. Set NDIGITS = 32 for the 128-bit adders. The two group sizes and
// the 64/128-bit widths are the proposal's; placing both adders in one top on
// shared operands is this design's way of presenting them together.
// Interface: a, b (packed BCD, digit 0 in bits 3:0), cin; sum_g16/cout_g16
// and sum_g32/cout_g32. Timing: combinational, no clock.
module hs_bcd_adder_top #(
  parameter int unsigned NDIGITS = 16
) (
  input  logic [4*NDIGITS-1:0] a,
  input  logic [4*NDIGITS-1:0] b,
  input  logic                 cin,
  output logic [4*NDIGITS-1:0] sum_g16,
  output logic                 cout_g16,
  output logic [4*NDIGITS-1:0] sum_g32,
  output logic                 cout_g32
);

  hs_bcd_adder #(.NDIGITS(NDIGITS), .GROUP_DIGITS(4)) u_g16 (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum_g16),
    .cout(cout_g16)
  );

  hs_bcd_adder #(.NDIGITS(NDIGITS), .GROUP_DIGITS(8)) u_g32 (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (sum_g32),
    .cout(cout_g32)
  );

endmodule : hs_bcd_adder_top
