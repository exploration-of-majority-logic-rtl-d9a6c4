// qca_ripple_adder: N-bit QCA ripple carry adder (4 bits by default).
//
// N majority-gate full adders (maj_full_adder) in series: the carry out of bit
// i is the carry in of bit i+1; the carry into bit 0 and out of bit N-1 are
// ports. The published 4-bit single-layer layout has a latency of 1.5 clock
// cycles, i.e. ZONES = 6 zones of the four-phase clock. No latency rule is
// published for other widths, so set ZONES by hand when N changes.
//
// Timing: `clk` ticks once per clock phase (4 phases per clock cycle). The
// operand is captured at the end of the tick in which `in_take` is high, once
// per clock cycle; values at other ticks are ignored. The result is on the
// outputs, with `o_valid` high, for the single tick ZONES ticks after the
// `in_take` tick (the hold phase of the output zone). Between those ticks the
// outputs keep their last value and `o_valid` is low. Treating each zone as a
// register stage clocked in its own phase, and putting the whole latency
// after the logic, are this design's own modelling choices.
module qca_ripple_adder #(
  parameter int unsigned N      = maj_pkg::RIPPLE_WIDTH,
  parameter int unsigned ZONES  = maj_pkg::QCA_RCA_ZONES,
  parameter int unsigned PHASES = maj_pkg::QCA_PHASES
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_take,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         o_valid
);
  logic [N:0]   carry;
  logic [N-1:0] s;

  assign carry[0] = cin;
  for (genvar k = 0; k < N; k++) begin : g_bit
    maj_full_adder u_fa (.a(a[k]), .b(b[k]), .cin(carry[k]), .sum(s[k]), .cout(carry[k+1]));
  end

  clock_zone_pipe #(.W(N + 1), .ZONES(ZONES), .PHASES(PHASES)) u_zones (
    .clk(clk), .rst_n(rst_n), .d({carry[N], s}), .in_take(in_take), .q({cout, sum}), .q_valid(o_valid)
  );
endmodule
