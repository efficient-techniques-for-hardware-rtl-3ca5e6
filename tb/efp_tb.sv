// efp_tb: checks the error-forward path for four elements (power-of-two
// build) against the reference rules: g_i = sat(x_i y*) * sat(|y|^2 - 1),
// with the 8-bit output indexing the squarers, and the three-sample
// latency of the path. Random x and y give error terms of both signs.
module efp_tb;
  import dcma_model_pkg::*;

  localparam int N = 4, BI = 8, BW = 12, BO = 8;
  logic clk = 0, rst_n = 1, en = 0;
  logic [BI-1:0] x_re [N], x_im [N];
  logic signed [BW-1:0] ye_re, ye_im;
  logic signed [BO-1:0] yo_re, yo_im;
  logic signed [2*BW-1:0] g_re [N], g_im [N];
  int checks = 0, failures = 0, n_sat = 0;
  longint hist[$][2*N];

  always #5 clk = ~clk;

  assign yo_re = ye_re[BW-1 -: BO];
  assign yo_im = ye_im[BW-1 -: BO];

  efp #(.N(N), .BI(BI), .BW(BW), .BO(BO), .POT(1'b1)) dut (.clk, .rst_n, .en,
    .x_re, .x_im, .ye_re, .ye_im, .yo_re, .yo_im, .g_re, .g_im);

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < N; i++) begin x_re[i] = 0; x_im[i] = 0; end
    ye_re = 0; ye_im = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      longint e, es, yr, yi, ex[2*N];
      ye_re = 12'($urandom); ye_im = 12'($urandom);
      yr = longint'(ye_re) >>> (BW - BO); yi = longint'(ye_im) >>> (BW - BO);
      e = yr * yr + yi * yi - (1 << 14);
      es = sat(e, 14, BW);
      if (es > 0) n_sat++;
      for (int i = 0; i < N; i++) begin
        longint xr, xi;
        x_re[i] = 8'(pot_enc(sx($urandom, 8), 8)); x_im[i] = 8'(pot_enc(sx($urandom, 8), 8));
        xr = mul(ye_re, x_re[i], 1, BI) + mul(ye_im, x_im[i], 1, BI);
        xi = mul(ye_re, x_im[i], 1, BI) - mul(ye_im, x_re[i], 1, BI);
        ex[2*i]   = sat(xr, BI + BW - 2, BW) * es;
        ex[2*i+1] = sat(xi, BI + BW - 2, BW) * es;
      end
      hist.push_back(ex);
      en = 1;
      @(posedge clk); #1;
      if (t >= 2) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (!(g_re[i] == hist[t-2][2*i] && g_im[i] == hist[t-2][2*i+1])) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d i=%0d g=%0d,%0d exp %0d,%0d", t, i, g_re[i], g_im[i], hist[t-2][2*i], hist[t-2][2*i+1]);
          end
        end
      end
    end
    checks++;
    if (n_sat == 0 || n_sat == 4000) begin failures++; $display("FAIL error term never took both signs"); end
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
