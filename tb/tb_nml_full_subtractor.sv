// tb_nml_full_subtractor: drives nml_full_subtractor with its NML three-phase clock model (one tick per
// phase). In every tick where the unit signals in_take a random operand is
// applied and remembered; in all other ticks random junk is applied, which
// must be ignored. Every tick the testbench checks that o_valid is high
// exactly 2 ticks after an in_take tick and low otherwise, that in_take comes
// once every 3 ticks, and that each valid result equals the reference
// arithmetic of the operand taken 2 ticks earlier.
module tb_nml_full_subtractor;
  localparam int unsigned Z = 2;
  localparam int unsigned P = 3;
  localparam int unsigned T = 600;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, take, ov;
  maj_pkg::fs_in_t i; maj_pkg::fs_out_t o;
  logic [31:0] v;
  logic [31:0] op   [T];
  bit          took [T];
  int          last_take = -1;

  nml_full_subtractor dut (.clk(clk), .rst_n(rst_n), .in_take(take), .i(i), .o(o), .o_valid(ov));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    v = '1;
    i = {v[2], v[1], v[0]};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ov !== 1'b0) begin failures++; $display("FAIL o_valid high in reset"); end
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      @(posedge clk);
      #1;
      // tick t: check the outputs, then drive the inputs sampled at its end
      checks++;
      if (ov !== (t >= int'(Z) && took[t-Z])) begin
        failures++;
        $display("FAIL t=%0d o_valid=%b", t, ov);
      end else if (ov && got() !== expected(op[t-Z])) begin
        failures++;
        $display("FAIL t=%0d got=%h exp=%h", t, got(), expected(op[t-Z]));
      end
      if (take) begin
        checks++;
        if (last_take >= 0 && t - last_take != int'(P)) begin
          failures++;
          $display("FAIL t=%0d in_take period %0d", t, t - last_take);
        end
        last_take = t;
      end
      v = $urandom;
      i = {v[2], v[1], v[0]};
      took[t] = take;
      op[t]   = v;
    end
    checks++;
    if (last_take < 0) begin failures++; $display("FAIL in_take never high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] got();
    return 32'({o.bout, o.diff});
  endfunction
  function automatic logic [31:0] expected(logic [31:0] w);
    int d;
    d = int'(w[2]) - int'(w[1]) - int'(w[0]);
    return 32'({d < 0, d[0]});
  endfunction
endmodule

