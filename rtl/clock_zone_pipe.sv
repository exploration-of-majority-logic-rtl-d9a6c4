// clock_zone_pipe: clock-zone timing of a field-coupled (QCA or NML) circuit.
//
// In QCA and NML the cells are grouped into clock zones driven by a clock with
// PHASES phases per cycle (QCA: switch, hold, release, relax; NML: switch,
// hold, reset). Zone k switches in phase k mod PHASES, computing from zone k-1
// while that zone holds, then holds its value for one phase and is neutral for
// the rest of the cycle. `clk` here ticks once per phase. The block keeps one
// register per zone after the input zone: register k loads only at the end of
// a tick with phase k mod PHASES. The input zone itself is the circuit's
// inputs, in zone 0.
//
// Timing, with a free-running phase counter cleared by reset:
//  * `in_take` is high in the tick (phase 1) at whose end the operand on `d`
//    is captured: the input zone is holding and zone 1 switching. Values on
//    `d` at other ticks are ignored, so one operand enters per clock cycle.
//  * The output zone ZONES switches ZONES phases after the input zone. Its
//    value is on `q` with `q_valid` high during its hold phase, the tick
//    ZONES ticks after the `in_take` tick. `q_valid` is low in every other
//    phase (the zone is switching or neutral) and until the first operand has
//    arrived. `q` keeps the last value loaded.
// Each zone is one register stage; this register model of the field clock is
// this design's own. ZONES >= 1, PHASES >= 2. Synchronous active-low reset.
module clock_zone_pipe #(
  parameter int unsigned W      = 1,
  parameter int unsigned ZONES  = 1,
  parameter int unsigned PHASES = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic         in_take,
  output logic [W-1:0] q,
  output logic         q_valid
);
  localparam int unsigned PW = (PHASES > 1) ? $clog2(PHASES) : 1;
  localparam logic [PW-1:0] OUT_HOLD = PW'((ZONES + 1) % PHASES);

  logic [PW-1:0] ph;               // phase of the current tick
  logic [W-1:0]  zone  [1:ZONES];  // value held by zone k
  logic [ZONES:1] full;            // zone k has received a real operand

  always_ff @(posedge clk) begin
    if (!rst_n) ph <= '0;
    else        ph <= (ph == PW'(PHASES - 1)) ? '0 : ph + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 1; k <= ZONES; k++) zone[k] <= '0;
      full <= '0;
    end else begin
      if (ph == PW'(1 % PHASES)) begin
        zone[1] <= d;
        full[1] <= 1'b1;
      end
      for (int unsigned k = 2; k <= ZONES; k++) begin
        if (ph == PW'(k % PHASES)) begin
          zone[k] <= zone[k-1];
          full[k] <= full[k-1];
        end
      end
    end
  end

  assign in_take = (ph == PW'(1 % PHASES));
  assign q       = zone[ZONES];
  assign q_valid = full[ZONES] && (ph == OUT_HOLD);

  initial begin
    assert (ZONES >= 1 && PHASES >= 2)
      else $error("clock_zone_pipe needs ZONES >= 1 and PHASES >= 2");
  end
endmodule
