// crtb1: conservative reversible test block 1, three Fredkin gates.
//
// Primary inputs A, B, C; constant lines anc[0] = 1 and anc[1] = 0.
// Primary outputs P = A xor B, Q = AB' + (A xnor B)C, R = AB + (A xor B)C.
// R is the majority of A, B, C, i.e. the carry of a full adder.
// Gate 1 (control B) and gate 2 (control A) swap the two constant lines, which
// leaves A xor B on the '0' line and A xnor B on the '1' line; gate 3 (control
// A xor B) swaps the C and A lines. Garbage: t[0] = A xnor B, t[1] = B.
// Combinational, conservative: the outputs hold as many 1s as the inputs.
module crtb1 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic [1:0] anc,
  output logic       p,
  output logic       q,
  output logic       r,
  output logic [1:0] t
);
  logic l1_g1, l2_g1;  // constant lines after gate 1
  logic a_g2;          // A line after gate 2
  logic x_g2;          // A xor B, control of gate 3

  fredkin u_g1 (.a(b),    .b(anc[0]), .c(anc[1]), .p(t[1]), .q(l1_g1), .r(l2_g1));
  fredkin u_g2 (.a(a),    .b(l1_g1),  .c(l2_g1),  .p(a_g2), .q(t[0]),  .r(x_g2));
  fredkin u_g3 (.a(x_g2), .b(c),      .c(a_g2),   .p(p),    .q(q),     .r(r));
endmodule
