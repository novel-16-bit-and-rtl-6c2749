// correction_logic: third stage, turns the first-stage binary sum of a digit
// back into BCD.
//
// It adds the correction value (0, 1, 6 or 7) to Sum(3:0) and keeps four bits.
// Adding 6 to a sum of 10..19 and dropping bit 4 gives the sum minus 10; the
// decimal carry itself comes from the carry network, so bit 4 is not needed.
// The document gives the operation; the plain 4-bit adder is this design's.
// Interface: bin_sum, corr in; digit out. Timing: combinational.
module correction_logic (
  input  logic [3:0] bin_sum,
  input  logic [3:0] corr,
  output logic [3:0] digit
);

  assign digit = bin_sum + corr;

endmodule : correction_logic
