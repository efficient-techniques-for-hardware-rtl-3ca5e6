// fxp_mult: two's-complement fixed-point multiplier.
//
// Full-precision signed product of an AW-bit and a BW-bit fraction
// (Q1.(AW-1) x Q1.(BW-1) gives AW+BW-2 fraction bits). Combinational; the
// pipeline register that follows it sits in the enclosing processing
// module. The document gives this multiplier only by its function and size
// (8 x 10 bits in the fixed-point build), so it is a plain array multiply.
module fxp_mult #(
  parameter int unsigned AW = 8,
  parameter int unsigned BW = 10
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] prod
);
  assign prod = (AW+BW)'(a) * (AW+BW)'(b);
endmodule
