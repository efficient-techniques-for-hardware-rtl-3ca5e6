// fxp_mult_tb: checks the 8 x 10-bit two's-complement multiplier on all
// corner operands and random pairs against integer multiplication.
module fxp_mult_tb;
  logic signed [7:0]  a;
  logic signed [9:0]  b;
  logic signed [17:0] prod;
  int checks = 0, failures = 0;

  fxp_mult #(.AW(8), .BW(10)) dut (.a, .b, .prod);

  task automatic one(int va, int vb);
    a = 8'(va); b = 10'(vb);
    #1;
    checks++;
    if (int'(prod) != int'(a) * int'(b)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, prod);
    end
  endtask

  initial begin
    one(-128, -512); one(-128, 511); one(127, -512); one(127, 511); one(0, -1);
    for (int i = 0; i < 20000; i++) one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
