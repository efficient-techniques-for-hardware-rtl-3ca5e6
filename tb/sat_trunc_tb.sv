// sat_trunc_tb: checks the saturation/truncation circuit against a
// clamp-after-shift model for random and corner inputs, for a word with
// integer bits (21 -> 12 bits, 16 fraction bits) and one without
// (12 -> 8 bits, 11 fraction bits, no overflow possible).
module sat_trunc_tb;
  import dcma_model_pkg::*;

  logic signed [20:0] a;  logic signed [11:0] ya;  logic oa;
  logic signed [11:0] b;  logic signed [7:0]  yb;  logic ob;
  int checks = 0, failures = 0;

  sat_trunc #(.IN_W(21), .IN_FRAC(16), .OUT_W(12)) dut_a (.din(a), .dout(ya), .ovf(oa));
  sat_trunc #(.IN_W(12), .IN_FRAC(11), .OUT_W(8))  dut_b (.din(b), .dout(yb), .ovf(ob));

  task automatic one(longint va, longint vb);
    longint ea, eb;
    a = 21'(va); b = 12'(vb);
    #1;
    ea = sat(sx(va, 21), 16, 12);
    eb = sat(sx(vb, 12), 11, 8);
    checks += 4;
    if (ya != ea) begin failures++; $display("FAIL a=%0d y=%0d exp %0d", a, ya, ea); end
    if (oa != (sx(va, 21) >= (longint'(1) << 16) || sx(va, 21) < -(longint'(1) << 16))) begin
      failures++; $display("FAIL a=%0d ovf=%0d", a, oa);
    end
    if (yb != eb) begin failures++; $display("FAIL b=%0d y=%0d exp %0d", b, yb, eb); end
    if (ob != 1'b0) begin failures++; $display("FAIL b ovf"); end
  endtask

  initial begin
    one(0, 0); one(65535, 2047); one(65536, -2048); one(-65536, -1);
    one(-65537, 1); one(1048575, 5); one(-1048576, 7);
    for (int i = 0; i < 20000; i++) one($urandom, $urandom);
    for (int i = 0; i < 2000; i++) one($urandom_range(140000) - 70000, $urandom);
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
