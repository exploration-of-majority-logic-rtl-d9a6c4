// tb_cr_test_ctrl: runs the all-0 / all-1 test sequence against four modelled
// units, some with a line stuck at 1 (mismatch under the all-0 vector) and some
// stuck at 0 (mismatch under the all-1 vector). Checks the exact cycle timing
// (one cycle per vector, done two cycles after start) and the fault flags.
module tb_cr_test_ctrl;
  localparam int unsigned NU = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, start;
  logic [NU-1:0] mismatch, sa1_fault, sa0_fault;
  logic test_en, test_val, busy, done;
  logic [NU-1:0] stuck1, stuck0;  // modelled faults per unit

  cr_test_ctrl #(.NUNITS(NU)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mismatch(mismatch),
    .test_en(test_en), .test_val(test_val), .busy(busy), .done(done),
    .sa1_fault(sa1_fault), .sa0_fault(sa0_fault)
  );

  // a unit with a stuck-at-1 line shows extra ones under the all-0 vector, a
  // stuck-at-0 line missing ones under the all-1 vector
  always_comb begin
    for (int u = 0; u < NU; u++)
      mismatch[u] = test_en && (test_val ? stuck0[u] : stuck1[u]);
  end

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_test(input logic [NU-1:0] s1, input logic [NU-1:0] s0);
    stuck1 = s1;
    stuck0 = s0;
    @(negedge clk);
    check(!busy && !test_en, "idle before start");
    start = 1;
    @(negedge clk);
    start = 0;
    check(test_en && !test_val && busy && !done, "all-0 vector in cycle 1");
    @(negedge clk);
    check(test_en && test_val && busy && !done, "all-1 vector in cycle 2");
    @(negedge clk);
    check(!test_en && !busy && done, "done after cycle 2");
    check(sa1_fault == s1, "stuck-at-1 flags");
    check(sa0_fault == s0, "stuck-at-0 flags");
    repeat (3) @(negedge clk);
    check(done && sa1_fault == s1 && sa0_fault == s0, "results held");
  endtask

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    start = 0;
    stuck1 = '0;
    stuck0 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(!done && !busy && sa1_fault == '0 && sa0_fault == '0, "reset state");
    rst_n = 1;
    run_test(4'b0000, 4'b0000);
    run_test(4'b0101, 4'b0000);
    run_test(4'b0000, 4'b1010);
    run_test(4'b1001, 4'b0110);
    for (int k = 0; k < 10; k++) run_test(NU'($urandom), NU'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
