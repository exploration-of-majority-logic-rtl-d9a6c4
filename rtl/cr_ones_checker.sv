// cr_ones_checker: counts the 1s on all input lines and all output lines of a
// conservative reversible circuit and flags a difference.
//
// A conservative reversible circuit keeps the number of 1s from its inputs to
// its outputs, so a difference means a fault. With the all-0 test vector a
// difference reveals a line stuck at 1, with the all-1 vector a line stuck at 0;
// with ordinary operands it still works as an online check. The comparator
// itself is this design's own (a plain population count). W is the number of
// lines, counting constants and garbage. Combinational.
module cr_ones_checker #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in_vec,
  input  logic [W-1:0] out_vec,
  output logic         mismatch
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] n_in, n_out;

  always_comb begin
    n_in  = '0;
    n_out = '0;
    for (int unsigned k = 0; k < W; k++) begin
      n_in  = n_in  + CW'(in_vec[k]);
      n_out = n_out + CW'(out_vec[k]);
    end
  end

  assign mismatch = (n_in != n_out);
endmodule
