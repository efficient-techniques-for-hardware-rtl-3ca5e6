// pot_encoder_tb: exhaustive check of the two's-complement to power-of-two
// encoder over all 256 8-bit inputs: the sign must be kept and exactly the
// largest power of two not above |d| must be set (none for zero, 2^-1 for
// -1.0).
module pot_encoder_tb;
  logic signed [7:0] d;
  logic        [7:0] p;
  int checks = 0, failures = 0;

  pot_encoder #(.BI(8)) dut (.d, .p);

  initial begin
    for (int v = -128; v < 128; v++) begin
      int mag, j;
      logic [7:0] e;
      d = 8'(v);
      #1;
      mag = (v < 0) ? -v : v;
      j = -1;
      for (int i = 0; i < 8; i++) if ((1 << i) <= mag) j = i;
      if (j > 6) j = 6;
      e = (j >= 0) ? 8'(1 << j) : 8'h00;
      e[7] = (v < 0);
      checks++;
      if (p !== e) begin
        failures++;
        $display("FAIL d=%0d p=%b exp %b", v, p, e);
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
