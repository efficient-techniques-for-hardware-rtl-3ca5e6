// beam_init_ctrl_tb: checks the beam-scan initialization. A detector model
// returns a power for whichever phase pattern is switched in. For random
// power sets (including ties) the controller must step through the four
// patterns of the beam table in order, finish in NB+1 = 5 clocks (under
// 500 ns at 16 MHz), pick the strongest beam (the earlier one on a tie),
// leave its pattern switched in and pulse done once. A second instance
// with SETTLE = 2 checks the longer dwell per beam.
module beam_init_ctrl_tb;
  import cma_pkg::*;

  logic clk = 0, rst_n = 1, start = 0, start2 = 0;
  logic [3:0] ps, ps2;
  logic [7:0] pwr, pwr2, bp, bp2;
  logic [1:0] best, best2;
  logic busy, done, busy2, done2;
  logic [7:0] beam_pwr [4];
  int checks = 0, failures = 0, n_ties = 0;

  always #31.25 clk = ~clk;   // 16 MHz

  // detector: power of the pattern currently applied
  function automatic logic [7:0] det(logic [3:0] p);
    for (int b = 0; b < 4; b++) if (p == BEAM_PS[b]) return beam_pwr[b];
    return 8'd0;
  endfunction
  assign pwr  = det(ps);
  assign pwr2 = det(ps2);

  beam_init_ctrl dut (.clk, .rst_n, .start, .pwr, .ps_ctrl(ps), .best, .best_pwr(bp), .busy, .done);
  beam_init_ctrl #(.SETTLE(2)) dut2 (.clk, .rst_n, .start(start2), .pwr(pwr2), .ps_ctrl(ps2),
    .best(best2), .best_pwr(bp2), .busy(busy2), .done(done2));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #1 rst_n = 0;
    for (int b = 0; b < 4; b++) beam_pwr[b] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int exp_b, cyc, seen;
      realtime t0;
      for (int b = 0; b < 4; b++) beam_pwr[b] = 8'($urandom_range(t % 3 == 0 ? 3 : 255));
      exp_b = 0;
      for (int b = 1; b < 4; b++) if (beam_pwr[b] > beam_pwr[exp_b]) exp_b = b;
      for (int b = 0; b < 4; b++) if (b != exp_b && beam_pwr[b] == beam_pwr[exp_b]) n_ties++;
      // fast scan
      start = 1; t0 = $realtime; @(posedge clk); #1; start = 0;
      cyc = 1; seen = 0;
      chk(ps == BEAM_PS[0] && busy, "beam 0 switched in");
      while (!done && cyc < 20) begin
        @(posedge clk); #1; cyc++;
        if (!done) begin
          chk(ps == BEAM_PS[cyc-1], $sformatf("beam %0d pattern", cyc - 1));
        end
      end
      chk(cyc == 5, $sformatf("scan takes 5 clocks (%0d)", cyc));
      chk(($realtime - t0) < 500.0, "scan under 500 ns");
      chk(best == 2'(exp_b), $sformatf("best %0d exp %0d", best, exp_b));
      chk(bp == beam_pwr[exp_b], "best power");
      chk(ps == BEAM_PS[exp_b], "best pattern applied");
      @(posedge clk); #1;
      chk(!done && !busy, "done is a pulse, scan over");
      chk(ps == BEAM_PS[exp_b], "pattern held");
      // slow scan
      start2 = 1; @(posedge clk); #1; start2 = 0;
      cyc = 1;
      while (!done2 && cyc < 40) begin @(posedge clk); #1; cyc++; end
      chk(cyc == 4 * 3 + 1, $sformatf("SETTLE=2 scan takes 13 clocks (%0d)", cyc));
      chk(best2 == 2'(exp_b) && ps2 == BEAM_PS[exp_b], "SETTLE=2 best");
    end
    chk(n_ties > 0, "ties exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
