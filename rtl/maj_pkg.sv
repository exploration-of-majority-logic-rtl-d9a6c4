// maj_pkg: shared types and constants for the majority-logic arithmetic designs.
//
// Holds the operand/result structs used on the top-level ports, the clock-zone
// latencies of the QCA and NML designs, and the constant (ancilla) input patterns
// of the two conservative reversible (Fredkin-gate) ripple carry adders.
//
// Latencies: a QCA clock cycle has four phases, so one clock zone is a quarter
// cycle. The QCA full adder and full subtractor have a latency of 0.75 cycles
// (3 zones) and the 4-bit ripple adder/subtractor 1.5 cycles (6 zones). In NML
// the inputs sit in clock zone 0; the 5-input majority gate output is in zone 1
// and the full adder/subtractor outputs in zone 2. These numbers follow the
// published layouts; modelling each zone as one register stage is this design's
// own choice, as is the use of a `valid` flag for the zone's hold phase.
package maj_pkg;

  // Clock phases per clock cycle: QCA switch/hold/release/relax, NML
  // switch/hold/reset. A zone switches once per cycle, so a circuit accepts
  // one operand per cycle, i.e. one per PHASES ticks of the phase clock.
  localparam int unsigned QCA_PHASES = 4;
  localparam int unsigned NML_PHASES = 3;

  // Clock-zone latencies (one zone = one tick of the phase clock)
  localparam int unsigned QCA_FA_ZONES   = 3;  // 0.75 clock cycles
  localparam int unsigned QCA_FS_ZONES   = 3;  // 0.75 clock cycles
  localparam int unsigned QCA_RCA_ZONES  = 6;  // 1.5 clock cycles, 4-bit
  localparam int unsigned QCA_RBS_ZONES  = 6;  // 1.5 clock cycles, 4-bit
  localparam int unsigned NML_MAJ5_ZONES = 1;  // output in clock zone 1
  localparam int unsigned NML_FA_ZONES   = 2;  // outputs in clock zone 2
  localparam int unsigned NML_FS_ZONES   = 2;  // outputs in clock zone 2

  // Default operand width of the ripple designs (4-bit examples)
  localparam int unsigned RIPPLE_WIDTH = 4;

  // One-bit adder operands and results
  typedef struct packed {
    logic a;
    logic b;
    logic cin;
  } fa_in_t;

  typedef struct packed {
    logic sum;
    logic cout;
  } fa_out_t;

  // One-bit subtractor operands (X - Y - Z) and results
  typedef struct packed {
    logic x;
    logic y;
    logic z;
  } fs_in_t;

  typedef struct packed {
    logic diff;
    logic bout;
  } fs_out_t;

  // Ancilla pattern of the method-1 CR ripple adder with n bits.
  // Bit 4i+0 / 4i+1: constant '1' / '0' lines of CRTB 1 in stage i.
  // Bit 4i+2 / 4i+3: constant '1' / '0' lines of CRTB 2 in stage i.
  // Bit 4n / 4n+1  : constant '0' / '1' lines of the carry-copy Fredkin gate.
  function automatic logic [127:0] cr_m1_ancilla(int unsigned n);
    logic [127:0] v;
    v = '0;
    for (int unsigned i = 0; i < n; i++) begin
      v[4*i+0] = 1'b1;
      v[4*i+1] = 1'b0;
      v[4*i+2] = 1'b1;
      v[4*i+3] = 1'b0;
    end
    v[4*n+0] = 1'b0;
    v[4*n+1] = 1'b1;
    return v;
  endfunction

  // Ancilla pattern of the method-2 CR ripple adder with n bits.
  // Stage i uses bits 4i+3..4i = lines (1, 0, 1, 0) from top to bottom.
  function automatic logic [127:0] cr_m2_ancilla(int unsigned n);
    logic [127:0] v;
    v = '0;
    for (int unsigned i = 0; i < n; i++) begin
      v[4*i+0] = 1'b1;
      v[4*i+1] = 1'b0;
      v[4*i+2] = 1'b1;
      v[4*i+3] = 1'b0;
    end
    return v;
  endfunction

endpackage
