// tb_maj5: exhaustive self-check of the 5-input majority gate against a count
// of ones (output must be 1 when three or more inputs are 1).
module tb_maj5;
  int checks = 0, failures = 0;
  logic [4:0] v;
  logic f;

  maj5 dut (.a(v[4]), .b(v[3]), .c(v[2]), .d(v[1]), .e(v[0]), .f(f));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      v = 5'(k);
      #1;
      checks++;
      if (f !== ($countones(v) >= 3)) begin
        failures++;
        $display("FAIL maj5 %b -> %b", v, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
