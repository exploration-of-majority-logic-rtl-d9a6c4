// cr_test_ctrl: offline stuck-at test sequencer for conservative reversible
// units.
//
// A pulse on `start` runs two test cycles. In the first, `test_en` = 1 and
// `test_val` = 0: every input line of every unit (operands and constants) is
// driven with 0 and a unit whose ones checker reports a mismatch has a line
// stuck at 1. In the second, `test_val` = 1 and a mismatch reveals a line stuck
// at 0. The checker results are sampled at the rising edge that ends each test
// cycle. `done` rises after the second cycle and, with `sa1_fault` and
// `sa0_fault`, holds until the next `start`. The two test vectors and what each
// one detects follow the reversible-logic testing rule; the cycle-level
// sequencing is this design's own. Synchronous active-low reset.
module cr_test_ctrl #(
  parameter int unsigned NUNITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NUNITS-1:0] mismatch,
  output logic              test_en,
  output logic              test_val,
  output logic              busy,
  output logic              done,
  output logic [NUNITS-1:0] sa1_fault,
  output logic [NUNITS-1:0] sa0_fault
);
  typedef enum logic [1:0] {
    IDLE     = 2'd0,
    ALL_ZERO = 2'd1,
    ALL_ONE  = 2'd2
  } state_t;

  state_t state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      done      <= 1'b0;
      sa1_fault <= '0;
      sa0_fault <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start) begin
            state     <= ALL_ZERO;
            done      <= 1'b0;
            sa1_fault <= '0;
            sa0_fault <= '0;
          end
        end
        ALL_ZERO: begin
          sa1_fault <= mismatch;
          state     <= ALL_ONE;
        end
        ALL_ONE: begin
          sa0_fault <= mismatch;
          done      <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign test_en  = (state != IDLE);
  assign test_val = (state == ALL_ONE);
  assign busy     = test_en;

  // the test value is only driven while a test runs; results are never
  // reported while a test is still running
  a_val_in_test: assert property (@(posedge clk) disable iff (!rst_n) test_val |-> test_en);
  a_done_idle:   assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
