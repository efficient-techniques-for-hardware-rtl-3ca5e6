// weight_bank_tb: checks the weight registers: reset and load give the
// initial weight, upd applies w <- sat(w - g * 2^-SH) with truncation and
// clamping at +/-1, and nothing changes without upd.
module weight_bank_tb;
  import dcma_model_pkg::*;

  localparam int N = 4, BW = 12, SH = 1;
  logic clk = 0, rst_n = 1, load = 0, upd = 0;
  logic signed [2*BW-1:0] g_re [N], g_im [N];
  logic signed [BW-1:0] w_re [N], w_im [N];
  longint mr[N], mi[N];
  int checks = 0, failures = 0, n_clamp = 0;

  always #5 clk = ~clk;

  weight_bank #(.N(N), .BW(BW), .SH(SH)) dut (.clk, .rst_n, .load, .upd, .g_re, .g_im, .w_re, .w_im);

  task automatic cmp(string s);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (w_re[i] != mr[i] || w_im[i] != mi[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s i=%0d w=%0d,%0d exp %0d,%0d", s, i, w_re[i], w_im[i], mr[i], mi[i]);
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < N; i++) begin g_re[i] = 0; g_im[i] = 0; mr[i] = 512; mi[i] = 0; end
    #2; cmp("reset");
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int mode;
      mode = $urandom_range(9);
      load = (mode == 0);
      upd  = (mode >= 3);
      for (int i = 0; i < N; i++) begin
        // large gradients now and then to reach the clamps
        g_re[i] = ($urandom_range(7) == 0) ? 24'($urandom) : 24'(sx($urandom, 18));
        g_im[i] = ($urandom_range(7) == 0) ? 24'($urandom) : 24'(sx($urandom, 18));
      end
      for (int i = 0; i < N; i++) begin
        if (load) begin mr[i] = 512; mi[i] = 0; end
        else if (upd) begin
          longint nr, ni;
          nr = sat((mr[i] <<< (BW - 1)) - (longint'(g_re[i]) >>> SH), 2*BW - 2, BW);
          ni = sat((mi[i] <<< (BW - 1)) - (longint'(g_im[i]) >>> SH), 2*BW - 2, BW);
          if (nr == 2047 || nr == -2048) n_clamp++;
          mr[i] = nr; mi[i] = ni;
        end
      end
      @(posedge clk); #1;
      cmp($sformatf("t=%0d", t));
    end
    checks++;
    if (n_clamp == 0) begin failures++; $display("FAIL clamp never reached"); end
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
