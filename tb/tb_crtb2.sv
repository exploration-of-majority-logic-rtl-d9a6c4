// tb_crtb2: exhaustive self-check of crtb2 against its published truth table
// (primary outputs P, Q, R), with the constant lines at 1 and 0. Also checks
// that the block is conservative for every one of the 32 assignments of its
// five input lines, and one-to-one over them.
module tb_crtb2;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [1:0] anc, t;
  logic [31:0] seen;

  crtb2 dut (.a(a), .b(b), .c(c), .anc(anc), .p(p), .q(q), .r(r), .t(t));

  // PQR for ABC = 000 .. 111
  localparam logic [2:0] TT [8] = '{3'b000, 3'b110, 3'b100, 3'b101, 3'b001, 3'b111, 3'b010, 3'b011};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    anc = 2'b01;  // anc[0] = 1, anc[1] = 0
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TT[v]) begin
        failures++;
        $display("FAIL crtb2 ABC=%b -> PQR=%b%b%b exp %b", 3'(v), p, q, r, TT[v]);
      end
    end
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {anc, a, b, c} = 5'(v);
      #1;
      checks++;
      if ($countones({p, q, r, t}) != $countones(5'(v))) begin
        failures++;
        $display("FAIL crtb2 not conservative for lines %b", 5'(v));
      end
      seen[{p, q, r, t}] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL crtb2 not one-to-one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
