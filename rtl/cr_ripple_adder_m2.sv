// cr_ripple_adder_m2: N-bit conservative reversible ripple carry adder,
// method 2 (5N Fredkin gates, delay 2N+2 gates).
//
// N method-2 full adders (cr_full_adder_m2) with the carry out of bit i wired
// to the carry in of bit i+1. Each bit forms A xor B without waiting for its
// carry, so only two gate delays per bit lie on the carry path.
// Constant lines: anc = maj_pkg::cr_m2_ancilla(N) in normal use, bits
// 4i+3..4i belonging to bit i. Garbage: garb[5i+4:5i] from bit i.
// Conservative: {anc, cin, b, a} and {garb, cout, sum} hold the same number of
// 1s. Combinational.
module cr_ripple_adder_m2 #(
  parameter int unsigned N = maj_pkg::RIPPLE_WIDTH
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           cin,
  input  logic [4*N-1:0] anc,
  output logic [N-1:0]   sum,
  output logic           cout,
  output logic [5*N-1:0] garb
);
  logic [N:0] carry;

  assign carry[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    cr_full_adder_m2 u_fa (.a(a[i]), .b(b[i]), .c(carry[i]), .anc(anc[4*i+3:4*i]),
                           .sum(sum[i]), .cout(carry[i+1]), .garb(garb[5*i+4:5*i]));
  end
  assign cout = carry[N];
endmodule
