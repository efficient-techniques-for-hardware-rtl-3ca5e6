// cplx_pm_tb: checks the processing module conj(a)*c in both arithmetics
// (power-of-two and fixed-point input operand) against the reference
// product rules, including the one-clock latency and the clock enable:
// with en low the output must hold.
module cplx_pm_tb;
  import dcma_model_pkg::*;

  logic clk = 0, rst_n = 1, en = 0;
  logic signed [11:0] a_re, a_im;
  logic [7:0] cp_re, cp_im, cf_re, cf_im;
  logic signed [20:0] zp_re, zp_im, zf_re, zf_im;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cplx_pm #(.BI(8), .BW(12), .POT(1'b1)) dut_p (.clk, .rst_n, .en, .a_re, .a_im,
    .c_re(cp_re), .c_im(cp_im), .z_re(zp_re), .z_im(zp_im));
  cplx_pm #(.BI(8), .BW(12), .POT(1'b0)) dut_f (.clk, .rst_n, .en, .a_re, .a_im,
    .c_re(cf_re), .c_im(cf_im), .z_re(zf_re), .z_im(zf_im));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    longint er, ei, fr, fi;
    #1 rst_n = 0;
    a_re = 0; a_im = 0; cp_re = 0; cp_im = 0; cf_re = 0; cf_im = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      a_re = 12'($urandom); a_im = 12'($urandom);
      cf_re = 8'($urandom); cf_im = 8'($urandom);
      cp_re = 8'(pot_enc(sx(cf_re, 8), 8)); cp_im = 8'(pot_enc(sx(cf_im, 8), 8));
      er = mul(a_re, cp_re, 1, 8) + mul(a_im, cp_im, 1, 8);
      ei = mul(a_re, cp_im, 1, 8) - mul(a_im, cp_re, 1, 8);
      fr = longint'(a_re) * sx(cf_re, 8) + longint'(a_im) * sx(cf_im, 8);
      fi = longint'(a_re) * sx(cf_im, 8) - longint'(a_im) * sx(cf_re, 8);
      en = 1;
      @(posedge clk); #1;
      en = 0;
      chk(zp_re == er && zp_im == ei, $sformatf("pot t=%0d %0d,%0d exp %0d,%0d", t, zp_re, zp_im, er, ei));
      chk(zf_re == fr && zf_im == fi, $sformatf("fxp t=%0d", t));
      // hold with en low while the operands change
      a_re = 12'($urandom); cf_re = 8'($urandom); cp_re = 8'($urandom);
      @(posedge clk); #1;
      chk(zp_re == er && zf_re == fr, "hold with en low");
    end
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
