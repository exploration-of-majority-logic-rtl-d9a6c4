// nml_full_adder: multilayer nanomagnetic-logic (NML) full adder using the
// 5-input majority gate.
//
// Logic: Cout = MAJ3(A,B,Cin), Sum = MAJ5(A,B,Cin,~Cout,~Cout), the same
// equations as the QCA adder. The inputs sit in clock zone 0 and both outputs
// in clock zone 2 of the three-phase clock: ZONES = 2. The five-layer cell
// stack is not modelled.
//
// Timing: `clk` ticks once per clock phase (3 phases per clock cycle). The
// operand is captured at the end of the tick in which `in_take` is high, once
// per clock cycle; values at other ticks are ignored. The result is on the
// outputs, with `o_valid` high, for the single tick ZONES ticks after the
// `in_take` tick (the hold phase of the output zone). Between those ticks the
// outputs keep their last value and `o_valid` is low. Treating each zone as a
// register stage clocked in its own phase, and putting the whole latency
// after the logic, are this design's own modelling choices.
module nml_full_adder #(
  parameter int unsigned ZONES  = maj_pkg::NML_FA_ZONES,
  parameter int unsigned PHASES = maj_pkg::NML_PHASES
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             in_take,
  input  maj_pkg::fa_in_t i,
  output maj_pkg::fa_out_t o,
  output logic             o_valid
);
  maj_pkg::fa_out_t comb_o;

  maj_full_adder u_fa (.a(i.a), .b(i.b), .cin(i.cin), .sum(comb_o.sum), .cout(comb_o.cout));

  clock_zone_pipe #(.W($bits(maj_pkg::fa_out_t)), .ZONES(ZONES), .PHASES(PHASES)) u_zones (
    .clk(clk), .rst_n(rst_n), .d(comb_o), .in_take(in_take), .q(o), .q_valid(o_valid)
  );
endmodule
