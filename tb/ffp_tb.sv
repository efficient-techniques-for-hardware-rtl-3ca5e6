// ffp_tb: checks the feed-forward path y = w^H x for four elements in both
// arithmetics against the reference products, with the two-sample latency
// of the pipeline (one register after the multipliers, one at the root of
// the adder tree) and full-precision output.
module ffp_tb;
  import dcma_model_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 1, en = 0;
  logic [7:0] xp_re [N], xp_im [N], xf_re [N], xf_im [N];
  logic signed [11:0] w_re [N], w_im [N];
  logic signed [22:0] yp_re, yp_im, yf_re, yf_im;
  int checks = 0, failures = 0;
  longint hp[$][4];

  always #5 clk = ~clk;

  ffp #(.N(N), .BI(8), .BW(12), .POT(1'b1)) dut_p (.clk, .rst_n, .en,
    .x_re(xp_re), .x_im(xp_im), .w_re, .w_im, .y_re(yp_re), .y_im(yp_im));
  ffp #(.N(N), .BI(8), .BW(12), .POT(1'b0)) dut_f (.clk, .rst_n, .en,
    .x_re(xf_re), .x_im(xf_im), .w_re, .w_im, .y_re(yf_re), .y_im(yf_im));

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < N; i++) begin
      xp_re[i] = 0; xp_im[i] = 0; xf_re[i] = 0; xf_im[i] = 0; w_re[i] = 0; w_im[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      longint pr, pi, fr, fi;
      pr = 0; pi = 0; fr = 0; fi = 0;
      for (int i = 0; i < N; i++) begin
        w_re[i] = 12'($urandom); w_im[i] = 12'($urandom);
        xf_re[i] = 8'($urandom); xf_im[i] = 8'($urandom);
        xp_re[i] = 8'(pot_enc(sx(xf_re[i], 8), 8)); xp_im[i] = 8'(pot_enc(sx(xf_im[i], 8), 8));
        pr += mul(w_re[i], xp_re[i], 1, 8) + mul(w_im[i], xp_im[i], 1, 8);
        pi += mul(w_re[i], xp_im[i], 1, 8) - mul(w_im[i], xp_re[i], 1, 8);
        fr += mul(w_re[i], xf_re[i], 0, 8) + mul(w_im[i], xf_im[i], 0, 8);
        fi += mul(w_re[i], xf_im[i], 0, 8) - mul(w_im[i], xf_re[i], 0, 8);
      end
      hp.push_back('{pr, pi, fr, fi});
      en = 1;
      @(posedge clk); #1;
      if (t >= 1) begin
        // y after this edge belongs to the sample before this one
        checks++;
        if (!(yp_re == hp[t-1][0] && yp_im == hp[t-1][1] && yf_re == hp[t-1][2] && yf_im == hp[t-1][3])) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d pot %0d exp %0d fxp %0d exp %0d", t, yp_re, hp[t-1][0], yf_re, hp[t-1][2]);
        end
      end
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
