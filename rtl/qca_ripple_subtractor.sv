// qca_ripple_subtractor: N-bit QCA ripple borrow subtractor (4 bits by
// default).
//
// Computes X - Y - Z with N majority-gate full subtractors
// (maj_full_subtractor): the borrow out of bit i is the borrow in of bit i+1,
// `z` is the borrow into bit 0 and `bout` the borrow out of bit N-1 (1 when the
// result is negative). Latency 1.5 clock cycles for the 4-bit layout, i.e.
// ZONES = 6 zones of the four-phase clock; set ZONES by hand for other widths.
//
// Timing: `clk` ticks once per clock phase (4 phases per clock cycle). The
// operand is captured at the end of the tick in which `in_take` is high, once
// per clock cycle; values at other ticks are ignored. The result is on the
// outputs, with `o_valid` high, for the single tick ZONES ticks after the
// `in_take` tick (the hold phase of the output zone). Between those ticks the
// outputs keep their last value and `o_valid` is low. Treating each zone as a
// register stage clocked in its own phase, and putting the whole latency
// after the logic, are this design's own modelling choices.
module qca_ripple_subtractor #(
  parameter int unsigned N      = maj_pkg::RIPPLE_WIDTH,
  parameter int unsigned ZONES  = maj_pkg::QCA_RBS_ZONES,
  parameter int unsigned PHASES = maj_pkg::QCA_PHASES
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_take,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         z,
  output logic [N-1:0] diff,
  output logic         bout,
  output logic         o_valid
);
  logic [N:0]   borrow;
  logic [N-1:0] d;

  assign borrow[0] = z;
  for (genvar k = 0; k < N; k++) begin : g_bit
    maj_full_subtractor u_fs (.x(x[k]), .y(y[k]), .z(borrow[k]), .diff(d[k]), .bout(borrow[k+1]));
  end

  clock_zone_pipe #(.W(N + 1), .ZONES(ZONES), .PHASES(PHASES)) u_zones (
    .clk(clk), .rst_n(rst_n), .d({borrow[N], d}), .in_take(in_take), .q({bout, diff}), .q_valid(o_valid)
  );
endmodule
