// nml_maj5: multilayer nanomagnetic-logic (NML) 5-input majority gate.
//
// The gate stacks five layers of identical cells: inputs and the output on
// layers 1, 3 and 5, single-cell magnetic vias on layers 2 and 4, so a central
// cell is driven from four sides and from above and below. Logically it is
// F = MAJ5(A,B,C,D,E), with i = {a, b, c, d, e} (a in bit 4). The inputs sit in
// clock zone 0 and the output in zone 1 of the three-phase clock: ZONES = 1.
// The physical stack is not modelled.
//
// Timing: `clk` ticks once per clock phase (3 phases per clock cycle). The
// operand is captured at the end of the tick in which `in_take` is high, once
// per clock cycle; values at other ticks are ignored. The result is on the
// outputs, with `o_valid` high, for the single tick ZONES ticks after the
// `in_take` tick (the hold phase of the output zone). Between those ticks the
// outputs keep their last value and `o_valid` is low. Treating each zone as a
// register stage clocked in its own phase, and putting the whole latency
// after the logic, are this design's own modelling choices.
module nml_maj5 #(
  parameter int unsigned ZONES  = maj_pkg::NML_MAJ5_ZONES,
  parameter int unsigned PHASES = maj_pkg::NML_PHASES
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       in_take,
  input  logic [4:0] i,
  output logic       f,
  output logic       o_valid
);
  logic comb_f;

  maj5 u_maj5 (.a(i[4]), .b(i[3]), .c(i[2]), .d(i[1]), .e(i[0]), .f(comb_f));

  clock_zone_pipe #(.W(1), .ZONES(ZONES), .PHASES(PHASES)) u_zones (
    .clk(clk), .rst_n(rst_n), .d(comb_f), .in_take(in_take), .q(f), .q_valid(o_valid)
  );
endmodule
