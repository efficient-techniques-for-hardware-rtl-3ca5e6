// fp_addsub_tb: checks the single-precision adder/subtractor. For operands
// whose exponents differ by at most 28 the exact sum fits in double
// precision and is truncated to single as the reference. Larger
// differences are checked directly: the sum is the larger operand when
// the signs agree, and the next value toward zero when they differ.
// Also zero operands, exact cancellation and near-cancellation, and the
// one-clock latency with en.
module fp_addsub_tb;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, sub = 0;
  logic [31:0] a = 0, b = 0, r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fp_addsub dut (.*);

  task automatic one(logic [31:0] x, logic [31:0] y, logic op, logic [31:0] exp_r);
    a = x; b = y; sub = op; en = 1;
    @(posedge clk); #1;
    checks++;
    if (r !== exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h exp %h", x, op ? "-" : "+", y, r, exp_r);
    end
  endtask

  function automatic logic [31:0] ref_small(logic [31:0] x, logic [31:0] y, logic op);
    real v;
    v = op ? to_real(x) - to_real(y) : to_real(x) + to_real(y);
    if (v == 0.0) return 32'd0;
    return trunc_single(v);
  endfunction

  initial begin
    logic [31:0] x, y, yy;
    logic op;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (r !== 0) failures++;
    for (int i = 0; i < 40000; i++) begin
      x = rnd(20, 230);
      y = {1'($urandom), 8'(int'(x[30:23]) + $urandom_range(28) - 14), 23'($urandom)};
      if ($urandom_range(3) == 0) y[22:0] = x[22:0] ^ 23'($urandom_range(3));   // near-cancellation
      op = 1'($urandom);
      one(x, y, op, ref_small(x, y, op));
    end
    for (int i = 0; i < 5000; i++) begin
      x = rnd(100, 200);
      y = {1'($urandom), 8'(int'(x[30:23]) - $urandom_range(60, 29)), 23'($urandom)};
      op = 1'($urandom);
      yy = {y[31] ^ op, y[30:0]};
      if ($urandom_range(1)) begin one(x, y, op, (x[31] == yy[31]) ? x : x - 1); end
      else                   begin one(y, x, op, (x[31] ^ op) == y[31] ? {x[31] ^ op, x[30:0]} : {x[31] ^ op, x[30:0]} - 1); end
    end
    one(32'h3F80_0000, 32'h3F80_0000, 1, 32'd0);
    one(32'h0000_0000, 32'hC040_0000, 1, 32'h4040_0000);
    one(32'h4040_0000, 32'h0000_0000, 0, 32'h4040_0000);
    one(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0, 32'h7F80_0000);
    one(32'h0080_0001, 32'h0080_0000, 1, 32'd0);   // below the normal range
    en = 0; a = 32'h4000_0000;
    repeat (2) @(posedge clk); #1;
    checks++; if (r !== 0) begin failures++; $display("FAIL hold"); end
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
