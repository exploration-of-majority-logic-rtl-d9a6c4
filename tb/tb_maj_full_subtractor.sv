// tb_maj_full_subtractor: exhaustive self-check of the majority-gate full
// subtractor against integer subtraction X - Y - Z.
module tb_maj_full_subtractor;
  int checks = 0, failures = 0;
  logic x, y, z, diff, bout;
  int d;

  maj_full_subtractor dut (.x(x), .y(y), .z(z), .diff(diff), .bout(bout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      d = int'(x) - int'(y) - int'(z);
      checks++;
      // difference bit is d mod 2; borrow is set when the result is negative
      if (diff !== d[0] || bout !== (d < 0)) begin
        failures++;
        $display("FAIL fs %b%b%b -> diff=%b bout=%b", x, y, z, diff, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
