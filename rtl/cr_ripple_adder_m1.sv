// cr_ripple_adder_m1: N-bit conservative reversible ripple carry adder,
// method 1 (6N+1 Fredkin gates, delay 3N+4 gates).
//
// A chain of N CRTB 1 blocks runs from bit 0 to bit N-1: block i adds A_i, B_i
// and the carry R_(i-1) (cin for bit 0) and passes its carry R_i up. A Fredkin
// gate copies the top carry onto a constant-0 line as Cout. A chain of N CRTB 2
// blocks then runs back from bit N-1 to bit 0: block i takes (carry, P_i, Q_i),
// where the carry is the copy for bit N-1 and otherwise the R_i handed back by
// block i+1, and produces Sum_i while restoring the carry into bit i and A_i.
// So the signal goes up the word and comes back down, which sets the delay.
// Constant lines: anc = maj_pkg::cr_m1_ancilla(N) in normal use (per bit 1,0
// for CRTB 1 and 1,0 for CRTB 2; then 0,1 for the copy gate). Garbage per bit i:
// garb[4i+1:4i] from CRTB 1, garb[4i+3:4i+2] from CRTB 2; garb[4N] = ~Cout.
// Conservative: {anc, cin, b, a} and {garb, cin_out, a_out, cout, sum} hold the
// same number of 1s. The CRTB 2 input order follows the gate diagram of the
// published 4-bit adder. Combinational.
module cr_ripple_adder_m1 #(
  parameter int unsigned N = maj_pkg::RIPPLE_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic [4*N+1:0] anc,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic [N-1:0] a_out,
  output logic         cin_out,
  output logic [4*N:0] garb
);
  logic [N:0]   r1;     // r1[0] = cin, r1[i+1] = carry out of CRTB 1 bit i
  logic [N-1:0] p1, q1;
  logic [N:0]   ret;    // ret[i+1] = carry returned down to CRTB 2 bit i
  logic [N-1:0] c_back; // carry into bit i restored by CRTB 2 bit i

  assign r1[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_up
    crtb1 u_crtb1 (.a(a[i]), .b(b[i]), .c(r1[i]), .anc(anc[4*i+1:4*i]),
                   .p(p1[i]), .q(q1[i]), .r(r1[i+1]), .t(garb[4*i+1:4*i]));
  end

  fredkin u_copy (.a(r1[N]), .b(anc[4*N]), .c(anc[4*N+1]), .p(ret[N]), .q(cout), .r(garb[4*N]));

  for (genvar i = 0; i < N; i++) begin : g_down
    crtb2 u_crtb2 (.a(ret[i+1]), .b(p1[i]), .c(q1[i]), .anc(anc[4*i+3:4*i+2]),
                   .p(sum[i]), .q(c_back[i]), .r(a_out[i]), .t(garb[4*i+3:4*i+2]));
    if (i > 0) begin : g_ret
      assign ret[i] = c_back[i];
    end
  end

  assign ret[0]  = c_back[0];
  assign cin_out = ret[0];
endmodule
