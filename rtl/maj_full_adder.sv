// maj_full_adder: full adder from one 3-input and one 5-input majority gate.
//
// Cout = MAJ3(A, B, Cin); Sum = MAJ5(A, B, Cin, ~Cout, ~Cout). The inverted
// carry enters the 5-input gate twice: whenever Cout is 1 it cancels two of
// the (at least two) ones among the inputs, which turns the majority into the
// three-input XOR. Combinational; the QCA and NML wrappers add the clock-zone
// latency of each technology.
module maj_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic ncout;

  maj3 u_carry (.a(a), .b(b), .c(cin), .f(cout));
  assign ncout = ~cout;
  maj5 u_sum (.a(a), .b(b), .c(cin), .d(ncout), .e(ncout), .f(sum));
endmodule
