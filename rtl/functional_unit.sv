// functional_unit: equal-input detector of the self-checking full adder.
//
//   eqt = a'b'c' + abc
//
// eqt is 1 exactly for the input vectors 000 and 111, the only two for which
// a full adder's sum equals its carry; for all other vectors the sum is the
// complement of the carry. The checker uses eqt to choose between those two
// cases when it builds its reference sum. Combinational.
module functional_unit (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic eqt
);
  always_comb eqt = (~a & ~b & ~c) | (a & b & c);
endmodule
