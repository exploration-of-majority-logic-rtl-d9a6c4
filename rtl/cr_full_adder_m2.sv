// cr_full_adder_m2: conservative reversible full adder, method 2 (5 Fredkin
// gates, delay 4 gates).
//
// Constant lines anc[0..3] = 1, 0, 1, 0 (normal value 4'b0101).
// Gate 1 (control B) and gate 2 (control A) swap the first 1/0 pair, leaving
// A xor B on its '0' line. Gate 3 (control C) swaps the second pair, leaving
// ~C and C. Gate 4 (control A xor B) swaps the C and A lines: the A line then
// carries Cout = (A xor B) ? C : A = MAJ(A,B,C). Gate 5 (control A xor B) swaps
// the second pair: its '0' line carries Sum = (A xor B) xor C. Gate 3 does not
// depend on gates 1-2, which is why the delay is 4 and not 5.
// Garbage garb[4:0] = {T4, T3 = A xor B, T2, T1 = A xnor B, T0 = B}.
// Conservative: {anc, c, b, a} and {garb, cout, sum} hold the same number of
// 1s. Combinational.
module cr_full_adder_m2 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic [3:0] anc,
  output logic       sum,
  output logic       cout,
  output logic [4:0] garb
);
  logic l1_g1, l2_g1;  // first constant pair after gate 1
  logic a_g2, x_ab;    // A line after gate 2, A xor B
  logic l3_g3, l4_g3;  // second constant pair after gate 3
  logic c_g3;          // C line after gate 3
  logic x_g4;          // A xor B line after gate 4

  fredkin u_g1 (.a(b),    .b(anc[0]), .c(anc[1]), .p(garb[0]), .q(l1_g1),   .r(l2_g1));
  fredkin u_g2 (.a(a),    .b(l1_g1),  .c(l2_g1),  .p(a_g2),    .q(garb[1]), .r(x_ab));
  fredkin u_g3 (.a(c),    .b(anc[2]), .c(anc[3]), .p(c_g3),    .q(l3_g3),   .r(l4_g3));
  fredkin u_g4 (.a(x_ab), .b(c_g3),   .c(a_g2),   .p(x_g4),    .q(garb[2]), .r(cout));
  fredkin u_g5 (.a(x_g4), .b(l3_g3),  .c(l4_g3),  .p(garb[3]), .q(garb[4]), .r(sum));
endmodule
