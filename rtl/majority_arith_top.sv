// majority_arith_top: the majority-logic arithmetic circuits side by side.
//
// Three independent groups, each with its own ports:
//  * QCA (quantum-dot cellular automata): a full adder and a full subtractor
//    with 0.75-cycle (3-zone) latency, and N-bit ripple carry adder and ripple
//    borrow subtractor with 1.5-cycle (6-zone) latency, all built from 3-input
//    and 5-input majority gates.
//  * NML (nanomagnetic logic): the multilayer 5-input majority gate (1 zone)
//    and the full adder and full subtractor built on it (2 zones).
//  * Conservative reversible (CR) adders made only of Fredkin gates: the
//    method-1 and method-2 full adders and N-bit ripple carry adders. Each has a
//    ones checker comparing the 1s on all its input and output lines; a shared
//    sequencer runs the offline all-0 / all-1 stuck-at test on all four.
// `clk` is the zone clock (one tick per clock phase) of the QCA and NML parts;
// the CR adders are combinational and only their test sequencer is clocked.
// QCA and NML operands are captured in the tick where `qca_in_take` /
// `nml_in_take` is high (once per four- or three-phase clock cycle); each
// result is valid for one tick, marked by its own `*_valid` output, ZONES ticks
// later. All QCA units share one phase alignment after reset, as do all NML
// units, so a single take strobe per technology is exported.
// During a test (`test_busy`) the CR sums on the ports are the test responses,
// not additions. `online_mismatch` flags a ones-count difference seen during
// normal operation. Grouping and test wiring are this design's own; the
// circuits inside follow the published designs.
module majority_arith_top
  import maj_pkg::*;
#(
  parameter int unsigned N = RIPPLE_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  // QCA
  output logic         qca_in_take,
  input  fa_in_t       qca_fa_i,
  output fa_out_t      qca_fa_o,
  output logic         qca_fa_valid,
  input  fs_in_t       qca_fs_i,
  output fs_out_t      qca_fs_o,
  output logic         qca_fs_valid,
  input  logic [N-1:0] qca_rca_a,
  input  logic [N-1:0] qca_rca_b,
  input  logic         qca_rca_cin,
  output logic [N-1:0] qca_rca_sum,
  output logic         qca_rca_cout,
  output logic         qca_rca_valid,
  input  logic [N-1:0] qca_rbs_x,
  input  logic [N-1:0] qca_rbs_y,
  input  logic         qca_rbs_z,
  output logic [N-1:0] qca_rbs_diff,
  output logic         qca_rbs_bout,
  output logic         qca_rbs_valid,
  // NML
  output logic         nml_in_take,
  input  logic [4:0]   nml_maj5_i,
  output logic         nml_maj5_f,
  output logic         nml_maj5_valid,
  input  fa_in_t       nml_fa_i,
  output fa_out_t      nml_fa_o,
  output logic         nml_fa_valid,
  input  fs_in_t       nml_fs_i,
  output fs_out_t      nml_fs_o,
  output logic         nml_fs_valid,
  // Conservative reversible adders
  input  fa_in_t       cr_fa_i,
  output fa_out_t      cr1_fa_o,
  output fa_out_t      cr2_fa_o,
  input  logic [N-1:0] cr_a,
  input  logic [N-1:0] cr_b,
  input  logic         cr_cin,
  output logic [N-1:0] cr1_sum,
  output logic         cr1_cout,
  output logic [N-1:0] cr2_sum,
  output logic         cr2_cout,
  input  logic         test_start,
  output logic         test_busy,
  output logic         test_done,
  output logic [3:0]   test_sa1_fault,
  output logic [3:0]   test_sa0_fault,
  output logic [3:0]   online_mismatch
);
  // ---------------------------------------------------------------- QCA
  logic [3:1] qca_take_other;  // take strobes of the other QCA units
  logic [2:1] nml_take_other;  // take strobes of the other NML units

  qca_full_adder u_qca_fa (
    .clk(clk), .rst_n(rst_n), .in_take(qca_in_take), .i(qca_fa_i), .o(qca_fa_o), .o_valid(qca_fa_valid)
  );
  qca_full_subtractor u_qca_fs (
    .clk(clk), .rst_n(rst_n), .in_take(qca_take_other[1]), .i(qca_fs_i), .o(qca_fs_o),
    .o_valid(qca_fs_valid)
  );

  qca_ripple_adder #(.N(N)) u_qca_rca (
    .clk(clk), .rst_n(rst_n), .in_take(qca_take_other[2]), .a(qca_rca_a), .b(qca_rca_b),
    .cin(qca_rca_cin), .sum(qca_rca_sum), .cout(qca_rca_cout), .o_valid(qca_rca_valid)
  );

  qca_ripple_subtractor #(.N(N)) u_qca_rbs (
    .clk(clk), .rst_n(rst_n), .in_take(qca_take_other[3]), .x(qca_rbs_x), .y(qca_rbs_y),
    .z(qca_rbs_z), .diff(qca_rbs_diff), .bout(qca_rbs_bout), .o_valid(qca_rbs_valid)
  );

  // ---------------------------------------------------------------- NML
  nml_maj5 u_nml_maj5 (
    .clk(clk), .rst_n(rst_n), .in_take(nml_in_take), .i(nml_maj5_i), .f(nml_maj5_f),
    .o_valid(nml_maj5_valid)
  );
  nml_full_adder u_nml_fa (
    .clk(clk), .rst_n(rst_n), .in_take(nml_take_other[1]), .i(nml_fa_i), .o(nml_fa_o),
    .o_valid(nml_fa_valid)
  );
  nml_full_subtractor u_nml_fs (
    .clk(clk), .rst_n(rst_n), .in_take(nml_take_other[2]), .i(nml_fs_i), .o(nml_fs_o),
    .o_valid(nml_fs_valid)
  );

  // the exported strobes stand for every unit of their technology
  a_qca_take_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    qca_take_other == {3{qca_in_take}});
  a_nml_take_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    nml_take_other == {2{nml_in_take}});

  // ---------------------------------------------------------------- CR adders
  localparam int unsigned W_FA1 = 9;        // 3 operands + 6 constants
  localparam int unsigned W_FA2 = 7;        // 3 operands + 4 constants
  localparam int unsigned W_RC1 = 6*N + 3;  // 2N+1 operands + 4N+2 constants
  localparam int unsigned W_RC2 = 6*N + 1;  // 2N+1 operands + 4N constants

  localparam logic [5:0]     ANC_FA1 = 6'(cr_m1_ancilla(1));
  localparam logic [3:0]     ANC_FA2 = 4'(cr_m2_ancilla(1));
  localparam logic [4*N+1:0] ANC_RC1 = (4*N+2)'(cr_m1_ancilla(N));
  localparam logic [4*N-1:0] ANC_RC2 = (4*N)'(cr_m2_ancilla(N));

  logic test_en, test_val;
  logic [3:0] mismatch;

  // input line vectors: normal operands and constants, or the test vector
  logic [W_FA1-1:0] fa1_in, fa1_out;
  logic [W_FA2-1:0] fa2_in, fa2_out;
  logic [W_RC1-1:0] rc1_in, rc1_out;
  logic [W_RC2-1:0] rc2_in, rc2_out;

  assign fa1_in = test_en ? {W_FA1{test_val}} : {ANC_FA1, cr_fa_i.cin, cr_fa_i.b, cr_fa_i.a};
  assign fa2_in = test_en ? {W_FA2{test_val}} : {ANC_FA2, cr_fa_i.cin, cr_fa_i.b, cr_fa_i.a};
  assign rc1_in = test_en ? {W_RC1{test_val}} : {ANC_RC1, cr_cin, cr_b, cr_a};
  assign rc2_in = test_en ? {W_RC2{test_val}} : {ANC_RC2, cr_cin, cr_b, cr_a};

  // method 1 full adder
  logic       fa1_a_out, fa1_c_out;
  logic [4:0] fa1_garb;
  cr_full_adder_m1 u_cr_fa1 (
    .a(fa1_in[0]), .b(fa1_in[1]), .c(fa1_in[2]), .anc(fa1_in[8:3]),
    .sum(cr1_fa_o.sum), .cout(cr1_fa_o.cout), .a_out(fa1_a_out), .c_out(fa1_c_out), .garb(fa1_garb)
  );
  assign fa1_out = {fa1_garb, fa1_a_out, fa1_c_out, cr1_fa_o.cout, cr1_fa_o.sum};

  // method 2 full adder
  logic [4:0] fa2_garb;
  cr_full_adder_m2 u_cr_fa2 (
    .a(fa2_in[0]), .b(fa2_in[1]), .c(fa2_in[2]), .anc(fa2_in[6:3]),
    .sum(cr2_fa_o.sum), .cout(cr2_fa_o.cout), .garb(fa2_garb)
  );
  assign fa2_out = {fa2_garb, cr2_fa_o.cout, cr2_fa_o.sum};

  // method 1 ripple carry adder
  logic [N-1:0] rc1_a_out;
  logic         rc1_cin_out;
  logic [4*N:0] rc1_garb;
  cr_ripple_adder_m1 #(.N(N)) u_cr_rc1 (
    .a(rc1_in[N-1:0]), .b(rc1_in[2*N-1:N]), .cin(rc1_in[2*N]), .anc(rc1_in[W_RC1-1:2*N+1]),
    .sum(cr1_sum), .cout(cr1_cout), .a_out(rc1_a_out), .cin_out(rc1_cin_out), .garb(rc1_garb)
  );
  assign rc1_out = {rc1_garb, rc1_cin_out, rc1_a_out, cr1_cout, cr1_sum};

  // method 2 ripple carry adder
  logic [5*N-1:0] rc2_garb;
  cr_ripple_adder_m2 #(.N(N)) u_cr_rc2 (
    .a(rc2_in[N-1:0]), .b(rc2_in[2*N-1:N]), .cin(rc2_in[2*N]), .anc(rc2_in[W_RC2-1:2*N+1]),
    .sum(cr2_sum), .cout(cr2_cout), .garb(rc2_garb)
  );
  assign rc2_out = {rc2_garb, cr2_cout, cr2_sum};

  // ones checkers
  cr_ones_checker #(.W(W_FA1)) u_chk_fa1 (.in_vec(fa1_in), .out_vec(fa1_out), .mismatch(mismatch[0]));
  cr_ones_checker #(.W(W_FA2)) u_chk_fa2 (.in_vec(fa2_in), .out_vec(fa2_out), .mismatch(mismatch[1]));
  cr_ones_checker #(.W(W_RC1)) u_chk_rc1 (.in_vec(rc1_in), .out_vec(rc1_out), .mismatch(mismatch[2]));
  cr_ones_checker #(.W(W_RC2)) u_chk_rc2 (.in_vec(rc2_in), .out_vec(rc2_out), .mismatch(mismatch[3]));

  cr_test_ctrl #(.NUNITS(4)) u_test (
    .clk(clk), .rst_n(rst_n), .start(test_start), .mismatch(mismatch),
    .test_en(test_en), .test_val(test_val), .busy(test_busy), .done(test_done),
    .sa1_fault(test_sa1_fault), .sa0_fault(test_sa0_fault)
  );

  assign online_mismatch = test_en ? 4'b0 : mismatch;
endmodule
