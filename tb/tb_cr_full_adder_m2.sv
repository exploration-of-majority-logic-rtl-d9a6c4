// tb_cr_full_adder_m2: exhaustive check of the method-2 conservative reversible
// full adder: addition with the normal constant lines (against integer
// addition), and over all 128 assignments of its seven input lines the
// conservative and one-to-one properties, including all-0 and all-1 vectors.
module tb_cr_full_adder_m2;
  int checks = 0, failures = 0;
  logic a, b, c, sum, cout;
  logic [3:0] anc;
  logic [4:0] garb;
  logic [6:0] lines_out;
  logic [127:0] seen;

  cr_full_adder_m2 dut (.a(a), .b(b), .c(c), .anc(anc), .sum(sum), .cout(cout), .garb(garb));

  assign lines_out = {garb, cout, sum};

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    anc = 4'(maj_pkg::cr_m2_ancilla(1));
    checks++;
    if (anc !== 4'b0101) begin failures++; $display("FAIL constant pattern %b", anc); end
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL ABC=%b -> cout=%b sum=%b", 3'(v), cout, sum);
      end
      checks++;
      if (garb[0] !== b || garb[3] !== (a ^ b) || garb[1] !== ~(a ^ b)) begin
        failures++;
        $display("FAIL garbage lines %b for ABC=%b", garb, 3'(v));
      end
    end
    seen = '0;
    for (int v = 0; v < 128; v++) begin
      {anc, c, b, a} = 7'(v);
      #1;
      checks++;
      if ($countones(lines_out) != $countones(7'(v))) begin
        failures++;
        $display("FAIL not conservative for %b", 7'(v));
      end
      seen[lines_out] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL not one-to-one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
