// cr_full_adder_m1: conservative reversible full adder, method 1 (7 Fredkin
// gates, delay 7 gates).
//
// CRTB 1 computes P = A xor B, Q and the carry R = MAJ(A,B,C). A Fredkin gate
// controlled by R copies the carry onto a constant-0 line without fan-out; that
// copy is Cout. CRTB 2, driven with (carry, P, Q), produces Sum = P xor C and
// hands back the original C and A on its Q and R outputs.
// Constant lines (anc, normal value 6'b100101): anc[1:0] = {0,1} for CRTB 1,
// anc[3:2] = {0,1} for CRTB 2, anc[4] = 0 (becomes Cout), anc[5] = 1.
// Garbage: garb[1:0] from CRTB 1 (A xnor B, B), garb[3:2] from CRTB 2
// (~Sum, A xor B), garb[4] = ~Cout. Every input line maps to exactly one output
// line and the count of 1s is kept, so driving every input line (operands and
// constants) with all 0s and then all 1s exposes any unidirectional stuck-at
// fault. The CRTB 2 input order follows the gate diagram of the published
// adder. Combinational.
module cr_full_adder_m1 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic [5:0] anc,
  output logic       sum,
  output logic       cout,
  output logic       a_out,
  output logic       c_out,
  output logic [4:0] garb
);
  logic p1, q1, r1;   // CRTB 1 primary outputs
  logic r_copy;       // carry line after the copy gate

  crtb1 u_crtb1 (.a(a), .b(b), .c(c), .anc(anc[1:0]), .p(p1), .q(q1), .r(r1), .t(garb[1:0]));

  fredkin u_copy (.a(r1), .b(anc[4]), .c(anc[5]), .p(r_copy), .q(cout), .r(garb[4]));

  crtb2 u_crtb2 (.a(r_copy), .b(p1), .c(q1), .anc(anc[3:2]),
                 .p(sum), .q(c_out), .r(a_out), .t(garb[3:2]));
endmodule
