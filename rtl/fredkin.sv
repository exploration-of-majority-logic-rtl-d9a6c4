// fredkin: conservative reversible Fredkin gate (controlled swap) built from
// majority voters.
//
// Inputs A (control), B, C; outputs P = A, Q = A'B + AC, R = AB + A'C. When the
// control is 1 the two target lines swap, otherwise they pass straight through.
// The gate maps inputs one-to-one onto outputs and keeps the number of 1s, so a
// unidirectional stuck-at fault shows up as a changed count of 1s.
//
// Structure: four majority voters with one input fixed at 0 (AND) in the first
// logic zone and two with one input fixed at 1 (OR) in the second, as in the
// published NML realisation. Combinational; in NML the outputs land two clock
// zones after the inputs.
module fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic na;
  logic and_ab, and_nac, and_nab, and_ac;

  assign na = ~a;

  // zone 1: AND terms (majority voter with polarisation 0)
  maj3 u_and_ab  (.a(a),  .b(b), .c(1'b0), .f(and_ab));
  maj3 u_and_nac (.a(na), .b(c), .c(1'b0), .f(and_nac));
  maj3 u_and_nab (.a(na), .b(b), .c(1'b0), .f(and_nab));
  maj3 u_and_ac  (.a(a),  .b(c), .c(1'b0), .f(and_ac));

  // zone 2: OR terms (majority voter with polarisation 1)
  maj3 u_or_r (.a(and_ab),  .b(and_nac), .c(1'b1), .f(r));
  maj3 u_or_q (.a(and_nab), .b(and_ac),  .c(1'b1), .f(q));

  assign p = a;
endmodule
