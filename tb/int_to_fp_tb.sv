// int_to_fp_tb: every 8-bit integer is converted and compared with the
// simulator's own conversion to single precision (exact for 8 bits); the
// result must appear one enabled clock later and hold while en is low.
module int_to_fp_tb;
  logic clk = 0, rst_n = 1, en = 0;
  logic signed [7:0] d = 0;
  logic [31:0] f;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  import fp_ref_pkg::*;
  int_to_fp #(.BI(8)) dut (.*);
  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int v = -128; v < 128; v++) begin
      d = 8'(v); en = 1;
      @(posedge clk); #1;
      checks++;
      if (f !== trunc_single(real'(v))) begin
        failures++; if (failures < 10) $display("FAIL %0d -> %h exp %h", v, f, trunc_single(real'(v)));
      end
    end
    en = 0; d = 8'sd5;
    @(posedge clk); #1;
    checks++; if (f !== trunc_single(127.0)) begin failures++; $display("FAIL hold"); end
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
