// sq_lut_tb: exhaustive check of the squarer table for all 8-bit inputs.
module sq_lut_tb;
  logic signed [7:0]  d;
  logic        [15:0] sq;
  int checks = 0, failures = 0;

  sq_lut #(.BO(8)) dut (.d, .sq);

  initial begin
    for (int v = -128; v < 128; v++) begin
      d = 8'(v);
      #1;
      checks++;
      if (int'(sq) != v * v) begin
        failures++;
        $display("FAIL %0d^2 = %0d", v, sq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
