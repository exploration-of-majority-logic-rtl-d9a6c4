// maj_full_subtractor: full subtractor X - Y - Z from one 3-input and one
// 5-input majority gate.
//
// Borrow B = MAJ3(~X, Y, Z) (= X'Y + X'Z + YZ);
// Diff = MAJ5(X, ~Y, ~Z, B, B) (= X xor Y xor Z).
// The borrow enters the 5-input gate twice, the same trick as the full adder
// with the operands Y and Z inverted. Combinational; the QCA and NML wrappers
// add the clock-zone latency.
module maj_full_subtractor (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic diff,
  output logic bout
);
  logic nx, ny, nz;

  assign nx = ~x;
  assign ny = ~y;
  assign nz = ~z;
  maj3 u_borrow (.a(nx), .b(y), .c(z), .f(bout));
  maj5 u_diff (.a(x), .b(ny), .c(nz), .d(bout), .e(bout), .f(diff));
endmodule
