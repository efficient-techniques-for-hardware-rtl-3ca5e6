// sample_ram_tb: writes random words to random addresses of the 2048 x 64
// sample RAM while reading others, and checks every read (one clock after
// its address) against a shadow copy.
module sample_ram_tb;
  logic clk = 0, we = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] shadow [2048];
  bit written [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_ram #(.DEPTH(2048), .WIDTH(64)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    // fill every word once
    for (int a = 0; a < 2048; a++) begin
      we = 1; waddr = 11'(a); wdata = {$urandom, $urandom};
      shadow[a] = wdata; written[a] = 1;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 6000; t++) begin
      logic [10:0] ra;
      logic [63:0] exp_d;
      ra = 11'($urandom);
      raddr = ra;
      we = $urandom_range(1);
      waddr = 11'($urandom);
      if (t % 5 == 0) waddr = ra;         // read and write the same word
      wdata = {$urandom, $urandom};
      exp_d = shadow[ra];                 // read returns the old word
      if (we) shadow[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata != exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d read %h exp %h", ra, rdata, exp_d);
      end
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
