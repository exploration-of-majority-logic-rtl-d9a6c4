// tb_fredkin: exhaustive self-check of the Fredkin gate against its truth
// table (controlled swap), plus the conservative and one-to-one properties.
module tb_fredkin;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] seen;

  fredkin dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // truth table rows PQR for ABC = 000 .. 111
  localparam logic [2:0] TT [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                    3'b100, 3'b110, 3'b101, 3'b111};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TT[v]) begin
        failures++;
        $display("FAIL fredkin %b%b%b -> %b%b%b", a, b, c, p, q, r);
      end
      checks++;
      if ($countones({p, q, r}) != $countones({a, b, c})) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL fredkin not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
