// maj3: 3-input majority gate (majority voter), the basic gate of QCA and NML.
//
// F = MAJ3(A,B,C) = AB + BC + AC. Fixing one input to 0 gives a 2-input AND,
// fixing it to 1 gives a 2-input OR, which is how the Fredkin gate is built.
// Purely combinational; in the physical technologies the output settles within
// the clock zone that holds the gate.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f
);
  assign f = (a & b) | (b & c) | (a & c);
endmodule
