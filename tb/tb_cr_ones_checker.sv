// tb_cr_ones_checker: drives random input and output vectors into a 12-line
// ones checker and compares its flag with a count of ones done in the
// testbench; also checks equal-count pairs built by permuting the input.
module tb_cr_ones_checker;
  localparam int unsigned W = 12;
  int checks = 0, failures = 0;
  logic [W-1:0] in_vec, out_vec;
  logic mismatch;

  cr_ones_checker #(.W(W)) dut (.in_vec(in_vec), .out_vec(out_vec), .mismatch(mismatch));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      in_vec = W'($urandom);
      if (k % 2 == 0) out_vec = {in_vec[0], in_vec[W-1:1]};       // same count
      else            out_vec = in_vec ^ (W'(1) << ($urandom % W)); // one line flipped
      if (k % 7 == 0) out_vec = W'($urandom);
      #1;
      checks++;
      if (mismatch !== ($countones(in_vec) != $countones(out_vec))) begin
        failures++;
        $display("FAIL in=%b out=%b mismatch=%b", in_vec, out_vec, mismatch);
      end
    end
    in_vec = '1; out_vec = '1; #1;
    checks++; if (mismatch !== 1'b0) failures++;
    in_vec = '0; out_vec = W'(1); #1;
    checks++; if (mismatch !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
