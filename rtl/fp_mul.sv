// fp_mul: IEEE-754 single-precision multiplier with a registered output.
//
// The product is formed in the four steps of a floating-point multiply:
// check for a zero operand, add the biased exponents and remove one bias,
// multiply the 24-bit significands (hidden one included) and normalise the
// 48-bit product by at most one place. The logic is combinational and one
// register stage holds the result, loaded when en is high, so p follows
// the operands by one enabled clock.
//
// Following the document: single precision (1 sign, 8 exponent, 23
// fraction bits, bias 127), the zero check, exponent addition less one
// bias, significand multiply, normalisation, one register after the logic.
// This design's choices: the product is truncated (rounded toward zero);
// an operand with a zero exponent field counts as zero (no subnormals);
// a result below the normal range is flushed to a signed zero and one
// above it becomes a signed infinity; infinities and NaNs at the inputs
// are not treated specially. A zero product keeps the sign sa ^ sb.
module fp_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] p
);
  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic        zero;
  logic signed [10:0] esum;
  logic [22:0] frac;
  logic [31:0] p_c;

  assign ea   = a[30:23];
  assign eb   = b[30:23];
  assign s    = a[31] ^ b[31];
  assign zero = (ea == '0) || (eb == '0);
  assign prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};

  always_comb begin
    esum = 11'(ea) + 11'(eb) - 11'sd127 + 11'(prod[47]);
    frac = prod[47] ? prod[46:24] : prod[45:23];
    if (zero || esum <= 0) p_c = {s, 31'd0};
    else if (esum >= 255)  p_c = {s, 8'hFF, 23'd0};
    else                   p_c = {s, esum[7:0], frac};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= p_c;
  end
endmodule
