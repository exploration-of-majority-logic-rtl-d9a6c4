// qca_full_subtractor: QCA full subtractor (X - Y - Z) built from one 3-input
// and one 5-input majority gate, with the clock-zone timing of its QCA layout.
//
// Logic: B = MAJ3(~X,Y,Z), Diff = MAJ5(X,~Y,~Z,B,B) (maj_full_subtractor).
// The published layout has a latency of 0.75 clock cycles, i.e. ZONES = 3
// zones of the four-phase clock. Cell layout and area are not modelled.
//
// Timing: `clk` ticks once per clock phase (4 phases per clock cycle). The
// operand is captured at the end of the tick in which `in_take` is high, once
// per clock cycle; values at other ticks are ignored. The result is on the
// outputs, with `o_valid` high, for the single tick ZONES ticks after the
// `in_take` tick (the hold phase of the output zone). Between those ticks the
// outputs keep their last value and `o_valid` is low. Treating each zone as a
// register stage clocked in its own phase, and putting the whole latency
// after the logic, are this design's own modelling choices.
module qca_full_subtractor #(
  parameter int unsigned ZONES  = maj_pkg::QCA_FS_ZONES,
  parameter int unsigned PHASES = maj_pkg::QCA_PHASES
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             in_take,
  input  maj_pkg::fs_in_t i,
  output maj_pkg::fs_out_t o,
  output logic             o_valid
);
  maj_pkg::fs_out_t comb_o;

  maj_full_subtractor u_fs (.x(i.x), .y(i.y), .z(i.z), .diff(comb_o.diff), .bout(comb_o.bout));

  clock_zone_pipe #(.W($bits(maj_pkg::fs_out_t)), .ZONES(ZONES), .PHASES(PHASES)) u_zones (
    .clk(clk), .rst_n(rst_n), .d(comb_o), .in_take(in_take), .q(o), .q_valid(o_valid)
  );
endmodule
