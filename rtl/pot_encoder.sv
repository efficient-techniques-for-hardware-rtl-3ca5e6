// pot_encoder: two's-complement sample to sign-magnitude power-of-two.
//
// The power-of-two build multiplies every input sample by shifting, so the
// samples must arrive as a sign bit plus a one-hot magnitude (bit i of
// p[BI-2:0] weighs 2^-(BI-1-i)). This encoder keeps the sign and the
// leading one of |d|, i.e. rounds the magnitude down to a power of two.
// Zero stays zero (sign 0, no magnitude bit); -1.0, whose magnitude has no
// place in the format, maps to -2^-1. Combinational. The document only
// states that the inputs are in this format; the rounding rule is this
// design's own.
module pot_encoder #(
  parameter int unsigned BI = 8
) (
  input  logic signed [BI-1:0] d,
  output logic        [BI-1:0] p
);
  logic [BI-1:0] mag;

  always_comb begin
    mag = d[BI-1] ? BI'(-d) : BI'(d);
    p   = '0;
    if (mag[BI-1]) begin
      p[BI-2] = 1'b1;                       // only -1.0 reaches here
    end else begin
      for (int i = 0; i < int'(BI) - 1; i++)
        if (mag[i]) p[BI-2:0] = (BI-1)'(1) << i;  // highest set bit wins
    end
    p[BI-1] = d[BI-1];
  end
endmodule
