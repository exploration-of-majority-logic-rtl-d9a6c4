// tb_clock_zone_pipe: checks the clock-zone timing model on its own, for
// several zone counts and both clock styles: (ZONES, PHASES) = (6,4), (3,4),
// (1,4), (2,3), (1,3) and (5,3), with 8-bit data. Each configuration gets a
// random byte in every tick; the testbench remembers the bytes applied in the
// in_take ticks and checks, every tick, that q_valid is high exactly ZONES
// ticks after an in_take tick (and low otherwise, including before the first
// operand arrives), that q then carries the byte taken, and that in_take
// comes once every PHASES ticks, starting in the first tick after reset.
module tb_clock_zone_pipe;
  localparam int unsigned NCFG = 6;
  localparam int unsigned T    = 400;
  localparam int unsigned ZCFG [NCFG] = '{6, 3, 1, 2, 1, 5};
  localparam int unsigned PCFG [NCFG] = '{4, 4, 4, 3, 3, 3};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  logic [7:0]      d    [NCFG];
  logic [7:0]      q    [NCFG];
  logic [NCFG-1:0] take, qv;
  logic [7:0]      op   [NCFG][T];
  bit              took [NCFG][T];

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    clock_zone_pipe #(.W(8), .ZONES(ZCFG[g]), .PHASES(PCFG[g])) dut (
      .clk(clk), .rst_n(rst_n), .d(d[g]), .in_take(take[g]), .q(q[g]), .q_valid(qv[g])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    for (int c = 0; c < NCFG; c++) d[c] = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (qv !== '0) begin failures++; $display("FAIL q_valid high in reset"); end
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      @(posedge clk);
      #1;
      for (int c = 0; c < NCFG; c++) begin
        checks++;
        // the phase counter holds 0 through the last reset tick and counts
        // from there, so tick t is in phase (t+1) mod PHASES and in_take is
        // high in the ticks with t mod PHASES == 0
        if (take[c] !== (t % int'(PCFG[c]) == 0)) begin
          failures++;
          $display("FAIL cfg=%0d t=%0d in_take=%b", c, t, take[c]);
        end
        checks++;
        if (qv[c] !== (t >= int'(ZCFG[c]) && took[c][t-ZCFG[c]])) begin
          failures++;
          $display("FAIL cfg=%0d t=%0d q_valid=%b", c, t, qv[c]);
        end else if (qv[c] && q[c] !== op[c][t-ZCFG[c]]) begin
          failures++;
          $display("FAIL cfg=%0d t=%0d q=%h exp=%h", c, t, q[c], op[c][t-ZCFG[c]]);
        end
        d[c]        = 8'($urandom);
        took[c][t]  = take[c];
        op[c][t]    = d[c];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
