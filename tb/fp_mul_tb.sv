// fp_mul_tb: checks the single-precision multiplier against a product
// formed in double precision (exact for two singles) and truncated to
// single. Random operands over a wide exponent range, zero operands,
// results that underflow and overflow; the result must appear one enabled
// clock after the operands and hold while en is low.
module fp_mul_tb;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  logic [31:0] a = 0, b = 0, p;
  int checks = 0, failures = 0, n_uf = 0, n_of = 0;
  always #5 clk = ~clk;
  fp_mul dut (.*);

  task automatic one(logic [31:0] x, logic [31:0] y);
    logic [31:0] exp_p;
    exp_p = trunc_single(to_real(x) * to_real(y));
    if (x[30:23] == 0 || y[30:23] == 0) exp_p = {x[31] ^ y[31], 31'd0};
    if (exp_p[30:23] == 0 && x[30:23] != 0 && y[30:23] != 0) n_uf++;
    if (exp_p[30:23] == 8'hFF) n_of++;
    a = x; b = y; en = 1;
    @(posedge clk); #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h exp %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (p !== 0) failures++;
    for (int i = 0; i < 20000; i++) one(rnd(1, 254), rnd(1, 254));   // includes under/overflow
    for (int i = 0; i < 20000; i++) one(rnd(100, 150), rnd(100, 150));
    one(32'h0000_0000, 32'h3F80_0000);
    one(32'hBF80_0000, 32'h0000_0000);
    one(32'h3F80_0000, 32'h3F80_0000);
    one(32'h3FFF_FFFF, 32'h3FFF_FFFF);
    // hold when en is low
    en = 0; a = 32'h4000_0000; b = 32'h4000_0000;
    repeat (3) @(posedge clk); #1;
    checks++; if (p !== trunc_single(to_real(32'h3FFF_FFFF) ** 2)) begin failures++; $display("FAIL hold"); end
    checks++; if (n_uf == 0 || n_of == 0) begin failures++; $display("FAIL range not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
