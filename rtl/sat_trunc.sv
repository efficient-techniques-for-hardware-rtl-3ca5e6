// sat_trunc: saturation and truncation of a fixed-point word.
//
// The input is a two's-complement number with IN_FRAC fraction bits; the
// output is a Q1.(OUT_W-1) fraction in [-1, 1 - 2^-(OUT_W-1)]. As in the
// document's circuit, the bits left of the radix point (excluding the sign)
// are combined by an AND and an OR: a negative input whose integer bits are
// not all ones has underflowed and gives the most negative output; a
// positive input with any integer bit set has overflowed and gives the most
// positive output. Otherwise the sign and the top OUT_W-1 fraction bits are
// passed on and the lower bits dropped (truncation toward minus infinity).
// Purely combinational. Requires IN_FRAC >= OUT_W-1.
module sat_trunc #(
  parameter int unsigned IN_W    = 21,
  parameter int unsigned IN_FRAC = 18,
  parameter int unsigned OUT_W   = 12
) (
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    ovf    // 1 when the output was clamped
);
  localparam int unsigned IB = IN_W - 1 - IN_FRAC;  // integer bits

  if (IN_FRAC < OUT_W - 1) begin : g_bad
    $error("sat_trunc: IN_FRAC must be at least OUT_W-1");
  end

  logic sign, all_ones, any_one, under, over;
  logic signed [OUT_W-1:0] trunc;

  assign sign  = din[IN_W-1];
  assign trunc = {sign, din[IN_FRAC-1 -: OUT_W-1]};

  if (IB > 0) begin : g_int
    assign all_ones = &din[IN_W-2 -: IB];
    assign any_one  = |din[IN_W-2 -: IB];
  end else begin : g_noint
    assign all_ones = 1'b1;
    assign any_one  = 1'b0;
  end

  assign under = sign & ~all_ones;
  assign over  = ~sign & any_one;
  assign ovf   = under | over;

  always_comb begin
    if (under)     dout = {1'b1, {(OUT_W-1){1'b0}}};
    else if (over) dout = {1'b0, {(OUT_W-1){1'b1}}};
    else           dout = trunc;
  end
endmodule
