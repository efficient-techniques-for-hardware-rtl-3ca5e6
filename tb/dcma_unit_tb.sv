// dcma_unit_tb: self-checking test of the 5D pipelined DCMA processor.
//
// Two instances run side by side on the same array signals: the power-of-
// two build (12-bit weights) and the fixed-point build (10-bit weights).
// Each is compared sample by sample with the bit-exact reference model in
// dcma_model_pkg: the 8-bit array output whenever y_valid is high and all
// weights after every sample. The input enable has random gaps, adaptation
// is switched off for a stretch, and the weights are re-initialised in the
// middle. The two-sample output latency and the five-sample gradient delay
// are checked explicitly, and over a long run the output envelope error
// ||y|^2 - 1| must fall, i.e. the constant-modulus adaptation converges.
module dcma_unit_tb;
  import dcma_model_pkg::*;
  import array_scenario_pkg::*;

  localparam int N = 4, BI = 8, BO = 8;

  logic clk = 0, rst_n = 1, init = 0, en = 0, adapt = 1;
  logic [BI-1:0] xp_re [N], xp_im [N];   // power-of-two codes
  logic [BI-1:0] xf_re [N], xf_im [N];   // two's complement
  logic signed [BO-1:0] yp_re, yp_im, yf_re, yf_im;
  logic yp_v, yf_v;
  logic signed [11:0] wp_re [N], wp_im [N];
  logic signed [9:0]  wf_re [N], wf_im [N];

  always #5 clk = ~clk;

  dcma_unit #(.N(N), .BW(12), .POT(1'b1), .MU_SH(8)) dut_p (
    .clk, .rst_n, .init, .en, .adapt, .x_re(xp_re), .x_im(xp_im),
    .y_re(yp_re), .y_im(yp_im), .y_valid(yp_v), .w_re(wp_re), .w_im(wp_im));
  dcma_unit #(.N(N), .BW(10), .POT(1'b0), .MU_SH(8)) dut_f (
    .clk, .rst_n, .init, .en, .adapt, .x_re(xf_re), .x_im(xf_im),
    .y_re(yf_re), .y_im(yf_im), .y_valid(yf_v), .w_re(wf_re), .w_im(wf_im));

  int checks = 0, failures = 0;
  dcma_model mp, mf;
  scenario   sc;
  longint    y_hist_p[$][2], y_hist_f[$][2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // drive one sample (en high for one clock), then compare
  real err_first = 0, err_last = 0;
  int  n_samp = 0;

  task automatic sample(bit gap_ok, int total);
    longint xr[], xi[], xpr[], xpi[];
    int r, i;
    xr = new[N]; xi = new[N]; xpr = new[N]; xpi = new[N];
    if (gap_ok && $urandom_range(3) == 0) begin
      en = 0; @(posedge clk); #1;
    end
    sc.next();
    for (int n = 0; n < N; n++) begin
      sc.elem(n, 4'b0110, r, i);
      xr[n] = r; xi[n] = i;
      xpr[n] = pot_enc(r, BI); xpi[n] = pot_enc(i, BI);
      xf_re[n] = BI'(r); xf_im[n] = BI'(i);
      xp_re[n] = BI'(xpr[n]); xp_im[n] = BI'(xpi[n]);
    end
    en = 1;
    @(posedge clk); #1;
    en = 0;
    mp.step(xpr, xpi, adapt);
    mf.step(xr, xi, adapt);
    y_hist_p.push_back('{mp.y_re, mp.y_im});
    y_hist_f.push_back('{mf.y_re, mf.y_im});
    // output after this edge is that of the sample two enables back
    if (mp.k >= 2) begin
      check(yp_v == 1'b1, "pot y_valid");
      check(yf_v == 1'b1, "fxp y_valid");
      check(yp_re == y_hist_p[$-1][0] && yp_im == y_hist_p[$-1][1],
            $sformatf("pot y sample %0d: %0d,%0d exp %0d,%0d", mp.k, yp_re, yp_im, y_hist_p[$-1][0], y_hist_p[$-1][1]));
      check(yf_re == y_hist_f[$-1][0] && yf_im == y_hist_f[$-1][1],
            $sformatf("fxp y sample %0d", mf.k));
      if (mp.k > 2) begin
        real e;
        e = ($itor(y_hist_f[$-1][0]) ** 2 + $itor(y_hist_f[$-1][1]) ** 2) / 16384.0 - 1.0;
        e = e < 0 ? -e : e;
        if (n_samp < 500) err_first += e;
        if (n_samp >= total - 500) err_last += e;
      end
    end else begin
      check(yp_v == (mp.k >= 2), "pot y_valid early");
      check(yf_v == (mf.k >= 2), "fxp y_valid early");
    end
    for (int n = 0; n < N; n++) begin
      check(wp_re[n] == mp.w_re[n] && wp_im[n] == mp.w_im[n],
            $sformatf("pot w%0d sample %0d: %0d,%0d exp %0d,%0d", n, mp.k, wp_re[n], wp_im[n], mp.w_re[n], mp.w_im[n]));
      check(wf_re[n] == mf.w_re[n] && wf_im[n] == mf.w_im[n],
            $sformatf("fxp w%0d sample %0d", n, mf.k));
    end
    n_samp++;
  endtask

  task automatic do_init();
    init = 1; @(posedge clk); #1; init = 0;
    mp.init(1 << 9); mf.init(1 << 7);
    y_hist_p.delete(); y_hist_f.delete();
  endtask

  initial begin
    bit moved;
    #1 rst_n = 0;
    mp = new(N, BI, BO, 12, 1'b1, 8);
    mf = new(N, BI, BO, 10, 1'b0, 8);
    sc = new();
    for (int n = 0; n < N; n++) begin
      xp_re[n] = '0; xp_im[n] = '0; xf_re[n] = '0; xf_im[n] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // weights hold their initial value for the first five samples
    do_init();
    for (int s = 0; s < 6; s++) begin
      sample(0, 100000);
      if (s < 5) check(wp_re[0] == 12'sd512 && wf_re[0] == 10'sd128, "no update before 5 samples");
    end
    // random gaps; the weights must have moved
    for (int s = 0; s < 200; s++) sample(1, 100000);
    moved = (wp_re[0] != 12'sd512) || (wp_im[0] != 0) || (wf_re[0] != 10'sd128) || (wf_im[0] != 0);
    check(moved, "weights adapt");
    adapt = 0;
    for (int s = 0; s < 50; s++) sample(1, 100000);
    adapt = 1;
    // re-initialise and run long enough to converge
    do_init();
    n_samp = 0;
    for (int s = 0; s < 6000; s++) sample(0, 6000);
    $display("mean ||y|^2-1| first 500: %f  last 500: %f", err_first / 500.0, err_last / 500.0);
    check(err_last < 0.5 * err_first, "envelope error falls (CMA converges)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
