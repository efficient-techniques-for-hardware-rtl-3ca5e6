// fp_mac_cma_tb: runs the floating-point CMA processor on 6000 snapshots
// of a four-element array receiving a QPSK signal and a weaker interferer
// through the 45-degree beam. For every snapshot a double-precision model
// starts from the processor's own weights, computes y, the error and the
// updated weights, and the processor's single-precision results must agree
// within a small tolerance; the 8-bit outputs must equal the truncated
// Q1.7 value of the floating-point y. Also checked: 69 clocks from x_valid
// to y_valid, busy over that time, a snapshot offered while busy is
// ignored, init restores the weights, and the envelope error falls.
module fp_mac_cma_tb;
  import fp_ref_pkg::*;
  import array_scenario_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1, init = 0, x_valid = 0;
  logic signed [7:0] x_re [N], x_im [N], y_re, y_im;
  logic busy, y_valid;
  logic [31:0] y_re_f, y_im_f, w_re [N], w_im [N];
  int checks = 0, failures = 0;
  always #31.25 clk = ~clk;
  fp_mac_cma dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL t=%0t %s", $time, s); end
  endtask

  function automatic bit close(real a, real b);
    real d;
    d = a - b; if (d < 0) d = -d;
    return d <= 2e-5 + 1e-4 * (b < 0 ? -b : b);
  endfunction

  function automatic int q17(real v);
    real s;
    s = v * 128.0;
    if (s >= 127.0) return 127;
    if (s <= -128.0) return -128;
    return $rtoi(s);
  endfunction

  initial begin
    scenario sc;
    real wr [N], wi [N], xr [N], xi [N], yr, yi, e, cr, ci, ea, eb;
    int r, im, cyc;
    #1 rst_n = 0;
    for (int n = 0; n < N; n++) begin x_re[n] = 0; x_im[n] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++)
      chk(to_real(w_re[n]) == 0.25 && w_im[n] == 0, "reset weights");
    sc = new(30.0, 120.0);
    ea = 0; eb = 0;
    for (int s = 0; s < 6000; s++) begin
      sc.next();
      for (int n = 0; n < N; n++) begin
        sc.elem(n, 4'b0110, r, im);
        x_re[n] = 8'(r); x_im[n] = 8'(im);
        xr[n] = r / 128.0; xi[n] = im / 128.0;
        wr[n] = to_real(w_re[n]); wi[n] = to_real(w_im[n]);
      end
      // model
      yr = 0; yi = 0;
      for (int n = 0; n < N; n++) begin
        yr += wr[n] * xr[n] + wi[n] * xi[n];
        yi += wr[n] * xi[n] - wi[n] * xr[n];
      end
      e  = (yr * yr + yi * yi - 1.0) / 1024.0;
      cr = e * yr; ci = e * yi;
      // run
      x_valid = 1;
      @(posedge clk); #1;
      x_valid = 0;
      cyc = 1;
      if (s == 7) begin
        x_valid = 1; @(posedge clk); #1; x_valid = 0; cyc++;  // ignored while busy
      end
      while (!y_valid && cyc < 200) begin
        chk(busy, "busy while processing");
        @(posedge clk); #1; cyc++;
      end
      chk(cyc == 69, $sformatf("69 clocks per snapshot (%0d)", cyc));
      chk(close(to_real(y_re_f), yr) && close(to_real(y_im_f), yi),
          $sformatf("y %f,%f exp %f,%f", to_real(y_re_f), to_real(y_im_f), yr, yi));
      chk(y_re == 8'(q17(to_real(y_re_f))) && y_im == 8'(q17(to_real(y_im_f))),
          $sformatf("y code %0d,%0d", y_re, y_im));
      for (int n = 0; n < N; n++) begin
        real nwr, nwi;
        nwr = wr[n] - (xr[n] * cr + xi[n] * ci);
        nwi = wi[n] - (xi[n] * cr - xr[n] * ci);
        chk(close(to_real(w_re[n]), nwr) && close(to_real(w_im[n]), nwi),
            $sformatf("w%0d %f,%f exp %f,%f", n, to_real(w_re[n]), to_real(w_im[n]), nwr, nwi));
      end
      @(posedge clk); #1;
      chk(!busy, "idle after y_valid");
      e = yr * yr + yi * yi - 1.0; e = e < 0 ? -e : e;
      if (s < 500) ea += e;
      if (s >= 5500) eb += e;
    end
    $display("mean ||y|^2-1|: first 500 %f, last 500 %f", ea / 500, eb / 500);
    chk(eb < 0.6 * ea, "envelope error falls");
    init = 1; @(posedge clk); #1; init = 0;
    for (int n = 0; n < N; n++)
      chk(to_real(w_re[n]) == 0.25 && w_im[n] == 0, "init weights");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
