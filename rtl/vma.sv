// vma: vector merging adder at the bottom of the bit-plane array.
//
// The array keeps its running sum in carry-save form: a sum vector and a
// carry vector. The VMA adds the two vectors into one binary word, giving
// the upper output bits y^m .. y^(m+l_0-1). Only its name and place are
// given for this design, so it is written as the simplest thing that does
// the job: one W-bit adder, modulo 2^W (the carry out of the top bit is
// dropped). It is combinational; its inputs come straight from the last
// row's registers.
module vma #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] sum_vec,
  input  logic [W-1:0] carry_vec,
  output logic [W-1:0] result
);
  always_comb result = sum_vec + carry_vec;
endmodule
