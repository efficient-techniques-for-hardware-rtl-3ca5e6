// fp_to_int_tb: random single-precision values from 2^-3 to 2^9 in size,
// both signs, plus integers and edge values, are converted to 8-bit
// integers and compared with the truncated, saturated real value.
module fp_to_int_tb;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  logic [31:0] f = 0;
  logic signed [7:0] d;
  int checks = 0, failures = 0, n_sat = 0;
  always #5 clk = ~clk;
  fp_to_int #(.OW(8)) dut (.*);

  task automatic one(logic [31:0] x);
    int e;
    real v;
    v = to_real(x);
    if (x[30:23] == 0) e = 0;
    else if (v >= 127.0) begin e = 127; n_sat++; end
    else if (v <= -128.0) begin e = -128; n_sat++; end
    else e = $rtoi(v);
    f = x; en = 1;
    @(posedge clk); #1;
    checks++;
    if (d !== 8'(e)) begin
      failures++; if (failures < 10) $display("FAIL %h (%f) -> %0d exp %0d", x, v, d, e);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) one(rnd(124, 136));
    for (int v = -130; v <= 130; v++) one(trunc_single(real'(v)));
    one(32'h0000_0000); one(32'h8000_0000); one(32'h7F7F_FFFF); one(32'hFF7F_FFFF);
    en = 0; f = 32'h4000_0000;
    @(posedge clk); #1;
    checks++; if (d !== -8'sd128) begin failures++; $display("FAIL hold"); end
    checks++; if (n_sat == 0) failures++;
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
