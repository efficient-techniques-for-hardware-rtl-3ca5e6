// cma_antenna_top_tb: end-to-end test of the adaptive antenna at its
// default parameters (four elements, power-of-two arithmetic, 12-bit
// weights, mu = 2^-10, 2048-sample test RAM, four beams).
//
// A detector model returns, for whichever phase pattern is switched in,
// the received power of the scenario (QPSK desired signal at 30 deg,
// interferer 3 dB weaker at 120 deg). Run 1 (test-RAM mode, as in the
// testing system): the RAM is loaded with 2048 snapshots taken through the
// strongest beam; start must scan the four beams, select the strongest,
// load the weights and play the RAM back one sample per clock. Run 2 (live
// mode): a second scenario is fed through the ADC port with random gaps
// in adc_valid. In both runs every array output and every weight is
// compared with the bit-exact model, the cycle counts of the scan and the
// playback are checked, and the envelope error must fall. Each mechanism
// (scan, every beam visited, RAM playback, live input with gaps, weight
// load, weight update) is counted and must have happened. Run 3 feeds 400
// snapshots to the floating-point MAC processor beside the DCMA path and
// checks its output and its 69-clock snapshot time.
module cma_antenna_top_tb;
  import cma_pkg::*;
  import dcma_model_pkg::*;
  import array_scenario_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 4, BI = 8, BO = 8, BW = 12, DEPTH = 2048;

  logic clk = 0, rst_n = 1, start = 0, src_ram = 0;
  logic scan_busy, scan_done, running, run_done;
  logic [7:0] pwr;
  logic [3:0] ps_ctrl;
  logic [1:0] beam_sel;
  logic signed [BI-1:0] adc_re [N], adc_im [N];
  logic adc_valid = 0;
  logic ld_we = 0;
  logic [10:0] ld_addr = 0;
  logic [63:0] ld_data = 0;
  logic signed [BO-1:0] y_re, y_im;
  logic y_valid;
  logic signed [BW-1:0] w_re [N], w_im [N];
  logic fp_init = 0, fp_x_valid = 0, fp_busy, fp_y_valid;
  logic signed [BI-1:0] fp_x_re [N], fp_x_im [N], fp_y_re, fp_y_im;
  logic [31:0] fp_y_re_f, fp_y_im_f, fp_w_re [N], fp_w_im [N];

  always #31.25 clk = ~clk;   // 16 MHz master clock

  cma_antenna_top dut (.*);

  int checks = 0, failures = 0;
  int n_fp = 0, n_scan = 0, n_ram = 0, n_live = 0, n_gap = 0, n_load = 0, n_upd = 0;
  int beam_seen [4] = '{0, 0, 0, 0};
  logic [7:0] beam_pwr [4];
  dcma_model m;
  scenario   sc;
  longint    yh[$][2];

  // detector model
  always_comb begin
    pwr = 8'd0;
    for (int b = 0; b < 4; b++) if (ps_ctrl == BEAM_PS[b]) pwr = beam_pwr[b];
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL t=%0t %s", $time, s); end
  endtask

  // stored samples (two's complement) of the current run, in order
  int sr [$][N], si [$][N];
  int next_s;
  real err_a, err_b;
  int  n_err;

  // Follow the processor: one model step per enabled clock.
  always @(posedge clk) begin
    if (dut.en) begin
      longint xr[], xi[];
      logic [N*BW-1:0] wr_before;
      xr = new[N]; xi = new[N];
      for (int n = 0; n < N; n++) begin
        xr[n] = pot_enc(sr[next_s][n], BI);
        xi[n] = pot_enc(si[next_s][n], BI);
      end
      next_s++;
      m.step(xr, xi);
      yh.push_back('{m.y_re, m.y_im});
      #1;
      if (m.k >= 2) begin
        real e;
        chk(y_valid, "y_valid");
        chk(y_re == yh[$-1][0] && y_im == yh[$-1][1],
            $sformatf("y %0d,%0d exp %0d,%0d (sample %0d)", y_re, y_im, yh[$-1][0], yh[$-1][1], m.k - 2));
        e = ($itor(y_re) ** 2 + $itor(y_im) ** 2) / 16384.0 - 1.0;
        e = e < 0 ? -e : e;
        if (m.k - 2 < 300) err_a += e;
        else if (m.k - 2 >= 1748 && m.k - 2 < 2048) begin err_b += e; n_err++; end
      end
      for (int n = 0; n < N; n++)
        chk(w_re[n] == m.w_re[n] && w_im[n] == m.w_im[n],
            $sformatf("w%0d %0d,%0d exp %0d,%0d", n, w_re[n], w_im[n], m.w_re[n], m.w_im[n]));
    end
  end

  // mechanism counters
  logic [3:0] ps_q;
  always @(posedge clk) begin
    if (scan_busy) for (int b = 0; b < 4; b++) if (ps_ctrl == BEAM_PS[b]) beam_seen[b]++;
    if (dut.cma_init) n_load++;
    if (dut.u_dcma.u_wb.upd) n_upd++;
  end

  function automatic int expected_beam();
    int b0 = 0;
    for (int b = 1; b < 4; b++) if (beam_pwr[b] > beam_pwr[b0]) b0 = b;
    return b0;
  endfunction

  task automatic set_powers();
    real p [4], pmax;
    pmax = 0;
    for (int b = 0; b < 4; b++) begin p[b] = sc.beam_power(BEAM_PS[b]); if (p[b] > pmax) pmax = p[b]; end
    for (int b = 0; b < 4; b++) beam_pwr[b] = 8'($rtoi(250.0 * p[b] / pmax));
    $display("beam powers: %0d %0d %0d %0d", beam_pwr[0], beam_pwr[1], beam_pwr[2], beam_pwr[3]);
  endtask

  task automatic scan_and_check(int exp_b);
    int cyc;
    start = 1; @(posedge clk); #2; start = 0;
    cyc = 1;
    while (!scan_done && cyc < 50) begin @(posedge clk); #2; cyc++; end
    n_scan++;
    // scan: 5 clocks in the controller plus one to hand over
    chk(cyc == 6, $sformatf("scan to scan_done in 6 clocks (%0d)", cyc));
    chk(beam_sel == 2'(exp_b), $sformatf("beam %0d selected, expected %0d", beam_sel, exp_b));
    chk(ps_ctrl == BEAM_PS[exp_b], "selected pattern applied");
    chk(running, "adaptation running");
  endtask

  initial begin
    int exp_b, cyc;
    #1 rst_n = 0;
    for (int n = 0; n < N; n++) begin adc_re[n] = 0; adc_im[n] = 0; fp_x_re[n] = 0; fp_x_im[n] = 0; end
    for (int b = 0; b < 4; b++) beam_pwr[b] = 0;
    m  = new(N, BI, BO, BW, 1'b1, 10);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- run 1: test RAM ----------------
    sc = new(30.0, 120.0);
    set_powers();
    exp_b = expected_beam();
    sr.delete(); si.delete();
    for (int a = 0; a < DEPTH; a++) begin
      int r [N], i [N];
      logic [63:0] word;
      sc.next();
      for (int n = 0; n < N; n++) begin
        sc.elem(n, BEAM_PS[exp_b], r[n], i[n]);
        word[16*n +: 8] = 8'(r[n]); word[16*n+8 +: 8] = 8'(i[n]);
      end
      sr.push_back(r); si.push_back(i);
      ld_we = 1; ld_addr = 11'(a); ld_data = word;
      @(posedge clk); #1;
    end
    ld_we = 0;
    src_ram = 1;
    next_s = 0; m.init(1 << (BW - 3)); yh.delete(); err_a = 0; err_b = 0; n_err = 0;
    scan_and_check(exp_b);
    cyc = 0;
    while (!run_done && cyc < 5000) begin @(posedge clk); #2; cyc++; end
    n_ram = next_s;
    chk(next_s == DEPTH, $sformatf("all %0d RAM samples processed (%0d)", DEPTH, next_s));
    // RAM start (1) + address-to-data (1) + 2048 samples + done (1)
    chk(cyc == DEPTH + 2, $sformatf("playback takes 2050 clocks (%0d)", cyc));
    @(posedge clk); #2;
    chk(!running, "idle after playback");
    $display("run 1: mean ||y|^2-1| first 300: %f  last 300: %f", err_a / 300.0, err_b / n_err);
    chk(err_b / n_err < 0.7 * err_a / 300.0, "envelope error falls in RAM run");

    // ---------------- run 2: live ADC samples ----------------
    sc = new(45.0, 160.0, 0.25);
    set_powers();
    exp_b = expected_beam();
    src_ram = 0;
    sr.delete(); si.delete();
    next_s = 0; m.init(1 << (BW - 3)); yh.delete(); err_a = 0; err_b = 0; n_err = 0;
    scan_and_check(exp_b);
    for (int s = 0; s < 2048; s++) begin
      int r [N], i [N];
      if ($urandom_range(2) == 0) begin
        adc_valid = 0; n_gap++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
      sc.next();
      for (int n = 0; n < N; n++) begin
        sc.elem(n, BEAM_PS[exp_b], r[n], i[n]);
        adc_re[n] = 8'(r[n]); adc_im[n] = 8'(i[n]);
      end
      sr.push_back(r); si.push_back(i);
      adc_valid = 1;
      // hold the sample until the processor takes it
      begin
        bit took;
        do begin #1; took = dut.en; @(posedge clk); #1; end while (!took);
      end
    end
    adc_valid = 0;
    repeat (3) @(posedge clk);
    n_live = next_s;
    chk(next_s == 2048, "all live samples processed");
    $display("run 2: mean ||y|^2-1| first 300: %f  last 300: %f", err_a / 300.0, err_b / n_err);
    chk(err_b / n_err < 0.7 * err_a / 300.0, "envelope error falls in live run");

    // ---------------- run 3: floating-point MAC processor ----------------
    fp_init = 1; @(posedge clk); #1; fp_init = 0;
    for (int s = 0; s < 400; s++) begin
      real wr [N], wi [N], xr [N], xi [N], yr, yi, dr, di;
      int r, i;
      sc.next();
      for (int n = 0; n < N; n++) begin
        sc.elem(n, BEAM_PS[exp_b], r, i);
        fp_x_re[n] = 8'(r); fp_x_im[n] = 8'(i);
        xr[n] = r / 128.0; xi[n] = i / 128.0;
        wr[n] = to_real(fp_w_re[n]); wi[n] = to_real(fp_w_im[n]);
      end
      yr = 0; yi = 0;
      for (int n = 0; n < N; n++) begin
        yr += wr[n] * xr[n] + wi[n] * xi[n];
        yi += wr[n] * xi[n] - wi[n] * xr[n];
      end
      fp_x_valid = 1; @(posedge clk); #1; fp_x_valid = 0;
      cyc = 1;
      while (!fp_y_valid && cyc < 200) begin @(posedge clk); #1; cyc++; end
      n_fp++;
      chk(cyc == 69, $sformatf("fp processor: 69 clocks per snapshot (%0d)", cyc));
      dr = to_real(fp_y_re_f) - yr; di = to_real(fp_y_im_f) - yi;
      chk(dr * dr + di * di < 1e-9, $sformatf("fp y %f,%f exp %f,%f", to_real(fp_y_re_f), to_real(fp_y_im_f), yr, yi));
      chk(fp_y_re == 8'($rtoi(to_real(fp_y_re_f) * 128.0)) && fp_y_im == 8'($rtoi(to_real(fp_y_im_f) * 128.0)),
          "fp y to 8-bit code");
    end
    chk(to_real(fp_w_re[0]) != 0.25, "fp weights adapt");

    // ---------------- mechanisms ----------------
    $display("fp snapshots=%0d", n_fp);
    chk(n_fp == 400, "fp processor ran");
    $display("mechanisms: scans=%0d beams=%0d,%0d,%0d,%0d ram_samples=%0d live_samples=%0d adc_gaps=%0d weight_loads=%0d weight_updates=%0d",
             n_scan, beam_seen[0], beam_seen[1], beam_seen[2], beam_seen[3], n_ram, n_live, n_gap, n_load, n_upd);
    chk(n_scan == 2, "two scans");
    for (int b = 0; b < 4; b++) chk(beam_seen[b] > 0, $sformatf("beam %0d visited", b));
    chk(n_ram > 0 && n_live > 0 && n_gap > 0, "RAM playback, live input and gaps happened");
    chk(n_load == 2 && n_upd > 3000, "weights loaded per run and updated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
