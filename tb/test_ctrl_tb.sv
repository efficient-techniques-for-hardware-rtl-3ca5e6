// test_ctrl_tb: checks the playback controller with a small depth and the
// default 2048: after start the addresses 0..DEPTH-1 are issued one per
// clock, sample_en follows each address by one clock (DEPTH pulses in a
// row), done pulses once right after the last one, and a start while busy
// is ignored (the 16-deep instance, idle by then, restarts instead).
module test_ctrl_tb;
  logic clk = 0, rst_n = 1, start = 0;
  logic [10:0] raddr;
  logic [3:0]  raddr_s;
  logic en, busy, done, en_s, busy_s, done_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_ctrl dut (.clk, .rst_n, .start, .raddr, .sample_en(en), .busy, .done);
  test_ctrl #(.DEPTH(16)) dut_s (.clk, .rst_n, .start, .raddr(raddr_s), .sample_en(en_s),
    .busy(busy_s), .done(done_s));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int n_en, n_en_s, n_done, n_done_s, last_addr, cyc, done_cyc, done_cyc_s;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      n_en = 0; n_en_s = 0; n_done = 0; n_done_s = 0; last_addr = -1;
      done_cyc = 0; done_cyc_s = 0;
      start = 1; @(posedge clk); #1; start = 0;
      chk(raddr == 0 && busy, "first address");
      for (cyc = 1; cyc < 2100; cyc++) begin
        // expected address sequence while reading
        if (cyc <= 2048) chk(int'(raddr) == cyc - 1, $sformatf("addr %0d at clock %0d", raddr, cyc));
        chk(en == (cyc >= 2 && cyc <= 2049), "sample_en one clock after each address");
        if (cyc == 100) begin start = 1; end       // ignored: busy
        if (en) n_en++;
        if (en_s) n_en_s++;
        if (done) begin n_done++; done_cyc = cyc; end
        if (done_s) begin n_done_s++; done_cyc_s = cyc; end
        @(posedge clk); #1; start = 0;
      end
      chk(n_en == 2048, $sformatf("2048 samples (%0d)", n_en));
      chk(n_en_s == 32, $sformatf("short: two runs of 16 samples (%0d)", n_en_s));
      chk(n_done == 1 && done_cyc == 2050, $sformatf("one done at clock 2050 (%0d at %0d)", n_done, done_cyc));
      chk(n_done_s == 2 && done_cyc_s == 118, $sformatf("short: second run restarted at 100 ends at 118 (%0d)", done_cyc_s));
      chk(!busy && !busy_s, "idle after the run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
