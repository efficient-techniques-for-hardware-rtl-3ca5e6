// test_ctrl: control circuit of the testing system.
//
// On start it reads the sample RAM from address 0 to DEPTH-1, one address
// per clock, and raises sample_en in the clock after each address, when the
// RAM's registered read data is present, so that the processor takes one
// sample per clock. done pulses in the clock after the last sample; busy is
// high from start until then. A start while busy is ignored. The document
// describes the controller by its function (enable CMA and generate the
// RAM addresses); this sequencing is this design's.
module test_ctrl #(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] raddr,
  output logic          sample_en,
  output logic          busy,
  output logic          done
);
  logic reading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      raddr     <= '0;
      sample_en <= 1'b0;
      done      <= 1'b0;
    end else begin
      sample_en <= reading;
      done      <= sample_en & ~reading;
      if (start && !busy) begin
        reading <= 1'b1;
        raddr   <= '0;
      end else if (reading) begin
        if (raddr == AW'(DEPTH - 1)) reading <= 1'b0;
        else                          raddr   <= raddr + 1'b1;
      end
    end
  end

  assign busy = reading | sample_en;
endmodule
