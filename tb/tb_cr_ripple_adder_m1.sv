// tb_cr_ripple_adder_m1: checks the 4-bit conservative reversible ripple carry adder
// cr_ripple_adder_m1 on all 512 operand combinations against integer addition (with the
// normal constant lines), and on 2000 random assignments of all its input
// lines, including constants, that the number of 1s is kept; the all-0 and
// all-1 vectors must come back unchanged.
module tb_cr_ripple_adder_m1;
  localparam int unsigned N = 4;
  localparam int unsigned NA = 4*N+2;
  int checks = 0, failures = 0;
  logic [N-1:0] a, b, sum;
  logic cin, cout;
  logic [NA-1:0] anc;
  logic [N-1:0] a_out; logic cin_out; logic [4*N:0] garb;
  localparam int unsigned WL = 2*N + 1 + NA;
  logic [WL-1:0] lines_in, lines_out;

  cr_ripple_adder_m1 #(.N(N)) dut (.a(a), .b(b), .cin(cin), .anc(anc), .sum(sum), .cout(cout), .a_out(a_out), .cin_out(cin_out), .garb(garb));

  assign lines_in  = {anc, cin, b, a};
  assign lines_out = {garb, cin_out, a_out, cout, sum};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    anc = NA'(maj_pkg::cr_m1_ancilla(N));
    for (int v = 0; v < 512; v++) begin
      {cin, b, a} = 9'(v);
      #1;
      checks++;
      if ({cout, sum} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", a, b, cin, {cout, sum});
      end
      checks++;
      if (a_out !== a || cin_out !== cin) begin failures++; $display("FAIL restored lines"); end
    end
    for (int k = 0; k < 2000; k++) begin
      {anc, cin, b, a} = WL'({$urandom, $urandom});
      #1;
      checks++;
      if ($countones(lines_out) != $countones(lines_in)) begin
        failures++;
        $display("FAIL not conservative for %b", lines_in);
      end
    end
    {anc, cin, b, a} = '0;
    #1;
    checks++;
    if (lines_out !== '0) begin failures++; $display("FAIL all-0 vector -> %b", lines_out); end
    {anc, cin, b, a} = '1;
    #1;
    checks++;
    if (lines_out !== '1) begin failures++; $display("FAIL all-1 vector -> %b", lines_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
