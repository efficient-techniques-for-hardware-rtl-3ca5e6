// pot_mult_tb: exhaustive check of the power-of-two multiplier over every
// 8-bit power-of-two code (sign, each magnitude bit, zero, and codes with
// several bits set) for random 12-bit operands. Expected product: the
// exact product a * 2^i, one's-complemented when the sign bit is set.
module pot_mult_tb;
  logic signed [11:0] a;
  logic        [7:0]  p;
  logic signed [19:0] prod;
  int checks = 0, failures = 0;

  pot_mult #(.BI(8), .BW(12)) dut (.a, .p, .prod);

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int code = 0; code < 256; code++) begin
        longint e; int hi;
        a = (t == 0) ? -12'sd2048 : (t == 1) ? 12'sd2047 : 12'($urandom);
        p = 8'(code);
        #1;
        hi = -1;
        for (int i = 0; i < 7; i++) if (p[i]) hi = i;
        if (hi < 0) e = 0;
        else begin
          e = longint'(a) * (longint'(1) << hi);
          if (p[7]) e = -e - 1;
        end
        checks++;
        if (longint'(prod) != e) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d p=%b prod=%0d exp %0d", a, p, prod, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
