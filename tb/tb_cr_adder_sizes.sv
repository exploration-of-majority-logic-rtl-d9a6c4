// tb_cr_adder_sizes: runs both conservative reversible ripple carry adders at
// the four sizes of the published cost/delay comparison (1, 2, 3 and 4 bits).
// Every size is checked on all operand combinations against integer addition
// and, with random constant-line values, for keeping the number of 1s.
module tb_cr_adder_sizes;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one method-1 and one method-2 adder per size; fills in their results
  for (genvar n = 1; n <= 4; n++) begin : g_size
    logic [n-1:0] a, b, s1, s2, a_out;
    logic cin, c1, c2, cin_out;
    logic [4*n+1:0] anc1;
    logic [4*n-1:0] anc2;
    logic [4*n:0] g1;
    logic [5*n-1:0] g2;

    cr_ripple_adder_m1 #(.N(n)) u_m1 (.a(a), .b(b), .cin(cin), .anc(anc1), .sum(s1), .cout(c1),
                                      .a_out(a_out), .cin_out(cin_out), .garb(g1));
    cr_ripple_adder_m2 #(.N(n)) u_m2 (.a(a), .b(b), .cin(cin), .anc(anc2), .sum(s2), .cout(c2), .garb(g2));

    task automatic run(output int nc, output int nf);
      nc = 0;
      nf = 0;
      anc1 = (4*n+2)'(maj_pkg::cr_m1_ancilla(n));
      anc2 = (4*n)'(maj_pkg::cr_m2_ancilla(n));
      for (int v = 0; v < (1 << (2*n+1)); v++) begin
        {cin, b, a} = (2*n+1)'(v);
        #1;
        nc += 2;
        if ({c1, s1} !== (n+1)'(int'(a) + int'(b) + int'(cin))) begin
          nf++;
          $display("FAIL method 1, %0d bits: %0d+%0d+%0d", n, a, b, cin);
        end
        if ({c2, s2} !== (n+1)'(int'(a) + int'(b) + int'(cin))) begin
          nf++;
          $display("FAIL method 2, %0d bits: %0d+%0d+%0d", n, a, b, cin);
        end
      end
      for (int k = 0; k < 300; k++) begin
        {anc1, cin, b, a} = (6*n+3)'({$urandom, $urandom});
        anc2 = (4*n)'($urandom);
        #1;
        nc += 2;
        if ($countones({g1, cin_out, a_out, c1, s1}) != $countones({anc1, cin, b, a})) nf++;
        if ($countones({g2, c2, s2}) != $countones({anc2, cin, b, a})) nf++;
      end
    endtask
  end

  initial begin
    int nc, nf;
    g_size[1].run(nc, nf); checks += nc; failures += nf;
    g_size[2].run(nc, nf); checks += nc; failures += nf;
    g_size[3].run(nc, nf); checks += nc; failures += nf;
    g_size[4].run(nc, nf); checks += nc; failures += nf;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
