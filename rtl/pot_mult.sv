// pot_mult: power-of-two multiplier.
//
// Multiplies a two's-complement weight-side operand a (Q1.(BW-1)) by a
// sign-magnitude power-of-two number p: bit BI-1 of p is the sign, and the
// single set bit i of p[BI-2:0] stands for 2^-(BI-1-i), so the value range
// is +/-2^-1 .. +/-2^-(BI-1). The product is a shifted left by i inside a
// BI+BW-bit word with BI+BW-2 fraction bits, i.e. the same format as an
// AW=BI fixed-point product. A negative p inverts every bit of the shifted
// word without adding one, as the document does to save the incrementer;
// the result is then one LSB below the exact product. A magnitude of zero
// gives zero (this design's choice); if several magnitude bits are set the
// highest one counts. Combinational.
module pot_mult #(
  parameter int unsigned BI = 8,
  parameter int unsigned BW = 12
) (
  input  logic signed [BW-1:0]    a,
  input  logic        [BI-1:0]    p,
  output logic signed [BI+BW-1:0] prod
);
  logic signed [BI+BW-1:0] shifted;

  always_comb begin
    shifted = '0;
    for (int i = 0; i < int'(BI) - 1; i++) begin
      if (p[i]) shifted = (BI+BW)'(a) <<< i;
    end
    if (p[BI-1] && (p[BI-2:0] != '0)) prod = ~shifted;
    else                              prod = shifted;
  end
endmodule
