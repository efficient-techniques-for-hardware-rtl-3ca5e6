// fp_to_int: converts an IEEE-754 single-precision value into a signed
// OW-bit integer for the D/A converter, with a registered output.
//
// The unbiased exponent says where the binary point lies in the 24-bit
// significand (hidden one restored). The significand is shifted right so
// that only the integer part remains, and the sign is applied. Fractions
// are cut off (round toward zero). Values outside the OW-bit range
// saturate to the largest or smallest code; zero exponents read as zero.
// FRAC moves the binary point: the output is the integer part of
// f * 2^FRAC (FRAC = 7 gives an 8-bit fraction in [-1, 1)).
// One register holds the result, loaded when en is high.
//
// Following the document: conversion of the processor's floating-point
// output to a signed integer for the D/A. This design's choices: the
// width OW (8, the converters' resolution), FRAC, truncation, saturation.
module fp_to_int #(
  parameter int unsigned OW   = 8,
  parameter int unsigned FRAC = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [31:0]          f,
  output logic signed [OW-1:0] d
);
  localparam logic [OW-1:0] MAXP = {1'b0, {(OW-1){1'b1}}};

  logic              s;
  logic signed [9:0] e;
  logic [23:0]       m, ip;
  logic [OW-1:0]     d_c;

  always_comb begin
    s  = f[31];
    e  = 10'(f[30:23]) - 10'sd127 + 10'(FRAC);
    m  = {1'b1, f[22:0]};
    ip = '0;
    d_c = '0;
    if (f[30:23] == '0 || e < 0) begin
      d_c = '0;                                     // |f| < 1
    end else if (e >= 10'(OW - 1)) begin
      // |f| >= 2^(OW-1): only -2^(OW-1) itself is representable
      d_c = s ? ~MAXP : MAXP;
    end else begin
      ip  = m >> (23 - e);
      d_c = s ? OW'(-ip) : OW'(ip);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= d_c;
  end
endmodule
