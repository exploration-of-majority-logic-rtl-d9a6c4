// tb_cr_full_adder_m1: exhaustive check of the method-1 conservative reversible
// full adder. With the normal constant lines it must add (compared with integer
// addition) and hand back A and C unchanged. Over all 512 assignments of its
// nine input lines it must keep the number of 1s and be one-to-one, so the
// all-0 and all-1 vectors come back as all-0 and all-1.
module tb_cr_full_adder_m1;
  int checks = 0, failures = 0;
  logic a, b, c, sum, cout, a_out, c_out;
  logic [5:0] anc;
  logic [4:0] garb;
  logic [8:0] lines_out;
  logic [511:0] seen;

  cr_full_adder_m1 dut (.a(a), .b(b), .c(c), .anc(anc), .sum(sum), .cout(cout),
                        .a_out(a_out), .c_out(c_out), .garb(garb));

  assign lines_out = {garb, a_out, c_out, cout, sum};

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    anc = 6'(maj_pkg::cr_m1_ancilla(1));
    checks++;
    if (anc !== 6'b100101) begin failures++; $display("FAIL constant pattern %b", anc); end
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(c)) || a_out !== a || c_out !== c) begin
        failures++;
        $display("FAIL ABC=%b -> cout=%b sum=%b a_out=%b c_out=%b", 3'(v), cout, sum, a_out, c_out);
      end
    end
    seen = '0;
    for (int v = 0; v < 512; v++) begin
      {anc, c, b, a} = 9'(v);
      #1;
      checks++;
      if ($countones(lines_out) != $countones(9'(v))) begin
        failures++;
        $display("FAIL not conservative for %b", 9'(v));
      end
      seen[lines_out] = 1'b1;
      if (v == 0 || v == 511) begin
        checks++;
        if (lines_out !== 9'(v)) begin failures++; $display("FAIL test vector %b -> %b", 9'(v), lines_out); end
      end
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL not one-to-one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
