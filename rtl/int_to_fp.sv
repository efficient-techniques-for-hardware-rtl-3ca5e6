// int_to_fp: converts a signed BI-bit integer sample (an ADC reading) into
// IEEE-754 single precision, with a registered output.
//
// The sample is split into sign and magnitude. A zero check routes zero
// straight to a zero word. Otherwise the position of the leading one of
// the magnitude gives the exponent, to which the bias is added, and a
// control signal from the same position sets how far the magnitude is
// shifted left so that its leading one drops off as the hidden bit; the
// bits below it become the significand. Every BI-bit integer (BI <= 24)
// is exact in single precision, so no rounding is needed. FRAC moves the
// binary point: the sample is read as d * 2^-FRAC (FRAC = 7 reads an
// 8-bit sample as a fraction in [-1, 1)). One register holds the result,
// loaded when en is high.
//
// Following the document: the split into sign and magnitude, zero check,
// exponent from the magnitude plus the bias, a control driving a left
// shift that yields the significand. This design's choices: the width BI
// (8, the converters' resolution), the leading-one search that forms the
// exponent, FRAC, the register and its enable.
module int_to_fp #(
  parameter int unsigned BI   = 8,
  parameter int unsigned FRAC = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [BI-1:0] d,
  output logic [31:0]          f
);
  logic          s;
  logic [BI-1:0] mag;
  int            lead;
  logic [23:0]   sh;
  logic [31:0]   f_c;

  always_comb begin
    s    = d[BI-1];
    mag  = s ? BI'(-d) : BI'(d);
    lead = 0;
    for (int i = 0; i < int'(BI); i++) if (mag[i]) lead = i;
    sh   = 24'(mag) << (23 - lead);
    if (mag == '0) f_c = 32'd0;
    else           f_c = {s, 8'(127 + lead - int'(FRAC)), sh[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  f <= '0;
    else if (en) f <= f_c;
  end
endmodule
