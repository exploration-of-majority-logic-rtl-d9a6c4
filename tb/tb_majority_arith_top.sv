// tb_majority_arith_top: end-to-end test of the whole design at its default
// parameters (4-bit ripple designs).
//
// Phase 1 applies random inputs to every QCA, NML and conservative reversible
// (CR) unit in every zone-clock tick. The QCA and NML units take an operand
// only in their take tick, once per clock cycle (4 ticks for QCA, 3 for NML);
// the testbench checks that each valid flag rises exactly at the published
// latency after a take tick (QCA 3 / 6 zones, NML 1 / 2 zones) and at no other
// tick, and that the result then matches integer arithmetic or a count of
// ones computed here. The combinational CR adders are checked every tick.
// Phase 2 runs the offline all-0 / all-1 test on a fault-free design.
// Phase 3 forces single internal lines of the CR adders stuck at 1 or at 0 and
// checks that the offline test flags exactly that unit with the right fault
// type, and that the online ones-count check reacts during normal operation.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_majority_arith_top;
  import maj_pkg::*;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n;
  logic qca_in_take, nml_in_take;
  logic qca_fa_valid, qca_fs_valid, qca_rca_valid, qca_rbs_valid;
  logic nml_maj5_valid, nml_fa_valid, nml_fs_valid;
  fa_in_t  qca_fa_i, nml_fa_i, cr_fa_i;
  fa_out_t qca_fa_o, nml_fa_o, cr1_fa_o, cr2_fa_o;
  fs_in_t  qca_fs_i, nml_fs_i;
  fs_out_t qca_fs_o, nml_fs_o;
  logic [N-1:0] qca_rca_a, qca_rca_b, qca_rca_sum, qca_rbs_x, qca_rbs_y, qca_rbs_diff;
  logic qca_rca_cin, qca_rca_cout, qca_rbs_z, qca_rbs_bout;
  logic [4:0] nml_maj5_i;
  logic nml_maj5_f;
  logic [N-1:0] cr_a, cr_b, cr1_sum, cr2_sum;
  logic cr_cin, cr1_cout, cr2_cout;
  logic test_start, test_busy, test_done;
  logic [3:0] test_sa1_fault, test_sa0_fault, online_mismatch;

  majority_arith_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_qca_lat = 0, n_nml_lat = 0, n_carry_ripple = 0, n_borrow_ripple = 0;
  int n_cr_add = 0, n_test_pass = 0, n_sa1_found = 0, n_sa0_found = 0, n_online = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // per tick of phase 1: was it a take tick, and the expected result of the
  // inputs applied in it
  localparam int unsigned T1 = 600;
  bit         tk_q [T1], tk_n [T1];
  logic [1:0] e_qfa [T1], e_qfs [T1], e_nfa [T1], e_nfs [T1];
  logic [4:0] e_rca [T1], e_rbs [T1];
  logic       e_maj [T1];
  int         last_q = -1, last_n = -1;

  function automatic logic [1:0] fa_ref(fa_in_t x);
    return 2'(int'(x.a) + int'(x.b) + int'(x.cin));
  endfunction
  function automatic logic [1:0] fs_ref(fs_in_t x);
    int d;
    d = int'(x.x) - int'(x.y) - int'(x.z);
    return {d < 0, d[0]};
  endfunction

  task automatic check_cr_adders();
    check({cr1_fa_o.cout, cr1_fa_o.sum} == fa_ref(cr_fa_i), "CR method-1 full adder");
    check({cr2_fa_o.cout, cr2_fa_o.sum} == fa_ref(cr_fa_i), "CR method-2 full adder");
    check({cr1_cout, cr1_sum} == 5'(int'(cr_a) + int'(cr_b) + int'(cr_cin)), "CR method-1 ripple adder");
    check({cr2_cout, cr2_sum} == 5'(int'(cr_a) + int'(cr_b) + int'(cr_cin)), "CR method-2 ripple adder");
    check(online_mismatch == 4'b0, "no online mismatch without faults");
    n_cr_add++;
  endtask

  task automatic run_offline_test();
    @(negedge clk);
    test_start = 1;
    @(negedge clk);
    test_start = 0;
    check(test_busy, "test running");
    @(negedge clk);
    @(negedge clk);
    check(test_done && !test_busy, "test done two cycles after start");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    test_start = 0;
    {qca_fa_i, qca_fs_i, nml_fa_i, nml_fs_i, cr_fa_i} = '0;
    {qca_rca_a, qca_rca_b, qca_rca_cin, qca_rbs_x, qca_rbs_y, qca_rbs_z} = '0;
    nml_maj5_i = '0;
    {cr_a, cr_b, cr_cin} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(!test_busy && !test_done, "test sequencer idle after reset");
    // ---------------- phase 1: stream operands through every unit
    // Each tick: check the outputs of this tick, then apply new inputs. Only
    // inputs applied in a take tick are operands; the rest must be ignored.
    for (int t = 0; t < T1; t++) begin
      check(qca_fa_valid  == (t >= int'(QCA_FA_ZONES)   && tk_q[t-QCA_FA_ZONES]),   "QCA full adder valid after 3 zones");
      check(qca_fs_valid  == (t >= int'(QCA_FS_ZONES)   && tk_q[t-QCA_FS_ZONES]),   "QCA full subtractor valid after 3 zones");
      check(qca_rca_valid == (t >= int'(QCA_RCA_ZONES)  && tk_q[t-QCA_RCA_ZONES]),  "QCA ripple adder valid after 6 zones");
      check(qca_rbs_valid == (t >= int'(QCA_RBS_ZONES)  && tk_q[t-QCA_RBS_ZONES]),  "QCA ripple subtractor valid after 6 zones");
      check(nml_maj5_valid == (t >= int'(NML_MAJ5_ZONES) && tk_n[t-NML_MAJ5_ZONES]), "NML 5-input majority valid after 1 zone");
      check(nml_fa_valid  == (t >= int'(NML_FA_ZONES)   && tk_n[t-NML_FA_ZONES]),   "NML full adder valid after 2 zones");
      check(nml_fs_valid  == (t >= int'(NML_FS_ZONES)   && tk_n[t-NML_FS_ZONES]),   "NML full subtractor valid after 2 zones");
      if (qca_fa_valid)  check({qca_fa_o.cout, qca_fa_o.sum} == e_qfa[t-QCA_FA_ZONES], "QCA full adder result");
      if (qca_fs_valid)  check({qca_fs_o.bout, qca_fs_o.diff} == e_qfs[t-QCA_FS_ZONES], "QCA full subtractor result");
      if (qca_rca_valid) check({qca_rca_cout, qca_rca_sum} == e_rca[t-QCA_RCA_ZONES], "QCA ripple adder result");
      if (qca_rbs_valid) check({qca_rbs_bout, qca_rbs_diff} == e_rbs[t-QCA_RBS_ZONES], "QCA ripple subtractor result");
      n_qca_lat += int'(qca_fa_valid) + int'(qca_fs_valid) + int'(qca_rca_valid) + int'(qca_rbs_valid);
      if (nml_maj5_valid) check(nml_maj5_f == e_maj[t-NML_MAJ5_ZONES], "NML 5-input majority result");
      if (nml_fa_valid)   check({nml_fa_o.cout, nml_fa_o.sum} == e_nfa[t-NML_FA_ZONES], "NML full adder result");
      if (nml_fs_valid)   check({nml_fs_o.bout, nml_fs_o.diff} == e_nfs[t-NML_FS_ZONES], "NML full subtractor result");
      n_nml_lat += int'(nml_maj5_valid) + int'(nml_fa_valid) + int'(nml_fs_valid);
      if (qca_in_take) begin
        check(t - last_q == int'(QCA_PHASES) || last_q < 0, "QCA operand taken once per four-phase cycle");
        last_q = t;
      end
      if (nml_in_take) begin
        check(t - last_n == int'(NML_PHASES) || last_n < 0, "NML operand taken once per three-phase cycle");
        last_n = t;
      end

      qca_fa_i = 3'($urandom);
      qca_fs_i = 3'($urandom);
      nml_fa_i = 3'($urandom);
      nml_fs_i = 3'($urandom);
      nml_maj5_i = 5'($urandom);
      {qca_rca_cin, qca_rca_b, qca_rca_a} = 9'($urandom);
      {qca_rbs_z, qca_rbs_y, qca_rbs_x} = 9'($urandom);
      if (qca_in_take && t % 40 < 4) {qca_rca_cin, qca_rca_b, qca_rca_a} = {1'b0, 4'b0001, 4'b1111};  // carry through all bits
      if (qca_in_take && t % 40 >= 20 && t % 40 < 24) {qca_rbs_z, qca_rbs_y, qca_rbs_x} = {1'b0, 4'b0001, 4'b0000};   // borrow through all bits
      cr_fa_i = 3'($urandom);
      {cr_cin, cr_b, cr_a} = 9'($urandom);
      if (t % 50 == 11) {cr_cin, cr_b, cr_a} = {1'b1, 4'b1111, 4'b0000};
      tk_q[t] = qca_in_take;
      tk_n[t] = nml_in_take;
      if (qca_in_take && qca_rca_a == 4'b1111 && qca_rca_b == 4'b0001) n_carry_ripple++;
      if (qca_in_take && qca_rbs_x == 4'b0000 && qca_rbs_y == 4'b0001) n_borrow_ripple++;
      e_qfa[t] = fa_ref(qca_fa_i);
      e_qfs[t] = fs_ref(qca_fs_i);
      e_nfa[t] = fa_ref(nml_fa_i);
      e_nfs[t] = fs_ref(nml_fs_i);
      e_maj[t] = $countones(nml_maj5_i) >= 3;
      e_rca[t] = 5'(int'(qca_rca_a) + int'(qca_rca_b) + int'(qca_rca_cin));
      begin
        int d;
        d = int'(qca_rbs_x) - int'(qca_rbs_y) - int'(qca_rbs_z);
        e_rbs[t] = {d < 0, 4'(d)};
      end
      #1;
      check_cr_adders();
      @(negedge clk);
    end

    // ---------------- phase 2: offline test, no fault
    run_offline_test();
    check(test_sa1_fault == 4'b0 && test_sa0_fault == 4'b0, "fault-free design passes");
    if (test_sa1_fault == 4'b0 && test_sa0_fault == 4'b0) n_test_pass++;

    // ---------------- phase 3: injected stuck-at faults
    // line A xor B of bit 1 in the method-2 ripple adder stuck at 1
    force dut.u_cr_rc2.g_bit[1].u_fa.x_ab = 1'b1;
    run_offline_test();
    check(test_sa1_fault == 4'b1000 && test_sa0_fault == 4'b0000, "stuck-at-1 found in method-2 ripple adder");
    if (test_sa1_fault[3]) n_sa1_found++;
    // online: operands with a1 == b1 make the stuck line wrong
    @(negedge clk);
    cr_a = 4'b0010; cr_b = 4'b0010; cr_cin = 1'b0;
    #1;
    check(online_mismatch == 4'b1000, "online check flags method-2 ripple adder");
    if (online_mismatch[3]) n_online++;
    release dut.u_cr_rc2.g_bit[1].u_fa.x_ab;

    // carry line out of bit 0 of the method-1 ripple adder stuck at 0
    force dut.u_cr_rc1.r1[1] = 1'b0;
    run_offline_test();
    check(test_sa1_fault == 4'b0000 && test_sa0_fault == 4'b0100, "stuck-at-0 found in method-1 ripple adder");
    if (test_sa0_fault[2]) n_sa0_found++;
    @(negedge clk);
    cr_a = 4'b0001; cr_b = 4'b0001; cr_cin = 1'b0;
    #1;
    check(online_mismatch == 4'b0100, "online check flags method-1 ripple adder");
    if (online_mismatch[2]) n_online++;
    release dut.u_cr_rc1.r1[1];

    // the sum line of the method-1 full adder stuck at 1
    force dut.cr1_fa_o.sum = 1'b1;
    run_offline_test();
    check(test_sa1_fault == 4'b0001 && test_sa0_fault == 4'b0000, "stuck-at-1 found in method-1 full adder");
    if (test_sa1_fault[0]) n_sa1_found++;
    release dut.cr1_fa_o.sum;

    // the carry line of the method-2 full adder stuck at 0
    force dut.u_cr_fa2.cout = 1'b0;
    run_offline_test();
    check(test_sa1_fault == 4'b0000 && test_sa0_fault == 4'b0010, "stuck-at-0 found in method-2 full adder");
    if (test_sa0_fault[1]) n_sa0_found++;
    release dut.u_cr_fa2.cout;

    // all faults removed: passes again and adds correctly
    run_offline_test();
    check(test_sa1_fault == 4'b0 && test_sa0_fault == 4'b0, "passes again after faults removed");
    if (test_sa1_fault == 4'b0 && test_sa0_fault == 4'b0) n_test_pass++;
    @(negedge clk);
    cr_a = 4'b1011; cr_b = 4'b0110; cr_cin = 1'b1; cr_fa_i = 3'b111;
    #1;
    check_cr_adders();

    $display("mechanisms: qca_latency=%0d nml_latency=%0d carry_ripple=%0d borrow_ripple=%0d cr_add=%0d",
             n_qca_lat, n_nml_lat, n_carry_ripple, n_borrow_ripple, n_cr_add);
    $display("mechanisms: test_pass=%0d sa1_found=%0d sa0_found=%0d online_flag=%0d",
             n_test_pass, n_sa1_found, n_sa0_found, n_online);
    check(n_qca_lat > 0, "QCA latency exercised");
    check(n_nml_lat > 0, "NML latency exercised");
    check(n_carry_ripple > 0, "full carry ripple exercised");
    check(n_borrow_ripple > 0, "full borrow ripple exercised");
    check(n_cr_add > 0, "CR additions exercised");
    check(n_test_pass > 0, "fault-free offline test exercised");
    check(n_sa1_found > 0, "stuck-at-1 detection exercised");
    check(n_sa0_found > 0, "stuck-at-0 detection exercised");
    check(n_online > 0, "online ones-count detection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
