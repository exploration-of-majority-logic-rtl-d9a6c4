// maj5: 5-input majority gate.
//
// F = MAJ5(A,B,C,D,E) is 1 when at least three inputs are 1; it is the OR of
// the ten 3-input product terms ABC + ABD + ... + CDE. Feeding the same signal
// into two inputs gives it double weight, which the full adder and full
// subtractor use to form an XOR3 from a single gate. Purely combinational.
module maj5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic f
);
  assign f = (a & b & c) | (a & b & d) | (a & b & e) | (a & c & d) | (a & c & e)
           | (a & d & e) | (b & c & d) | (b & c & e) | (b & d & e) | (c & d & e);
endmodule
