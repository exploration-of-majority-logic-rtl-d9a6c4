// crtb2: conservative reversible test block 2, three Fredkin gates.
//
// Primary inputs A, B, C; constant lines anc[0] = 1 and anc[1] = 0.
// Primary outputs P = A'B + B'C, Q = AB + B'C, R = AB' + BC.
// Gate 1 (control B) swaps the C and A lines, giving Q and R; gate 2 (control Q)
// and gate 3 (control B) swap the constant lines, leaving B xor Q = P on the
// '0' line. Garbage: t[0] = complement of P, t[1] = B.
// In the method-1 adder it is driven with (A, B, C) = (carry, A xor B, Q of
// CRTB 1): P is then the sum bit and Q and R give back the original C and A.
// Combinational and conservative.
module crtb2 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic [1:0] anc,
  output logic       p,
  output logic       q,
  output logic       r,
  output logic [1:0] t
);
  logic b_g1;    // B line after gate 1
  logic q_g1;    // Q, control of gate 2
  logic m1, m2;  // constant lines after gate 2

  fredkin u_g1 (.a(b),    .b(c),      .c(a),      .p(b_g1), .q(q_g1), .r(r));
  fredkin u_g2 (.a(q_g1), .b(anc[0]), .c(anc[1]), .p(q),    .q(m1),   .r(m2));
  fredkin u_g3 (.a(b_g1), .b(m1),     .c(m2),     .p(t[1]), .q(t[0]), .r(p));
endmodule
