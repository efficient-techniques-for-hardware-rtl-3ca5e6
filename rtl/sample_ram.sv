// sample_ram: test-sample memory of the processor's testing system.
//
// DEPTH words of WIDTH bits: one word holds one snapshot of the array, the
// I and Q samples of every element (element i's I at bits [16i+7:16i], Q at
// [16i+15:16i+8] for the default 8-bit samples). A host loads it through
// the write port; the test controller reads it through a synchronous read
// port (data one clock after the address). Written as an array so that it
// maps to block RAM. The depth of 2048 samples is the document's; the word
// layout is this design's.
module sample_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
