// sq_lut: look-up-table squarer.
//
// Returns d*d for a signed BO-bit Q1.(BO-1) word as an unsigned 2*BO-bit
// value with 2*BO-2 fraction bits. The document forms |y|^2 from squarer
// tables instead of multipliers; here the 2^BO-entry table is computed at
// elaboration (entry k holds the square of k read as a signed number) and
// read combinationally. The register after the squarer is in efp.
module sq_lut #(
  parameter int unsigned BO = 8
) (
  input  logic signed [BO-1:0]   d,
  output logic        [2*BO-1:0] sq
);
  localparam int unsigned DEPTH = 1 << BO;

  function automatic logic [2*BO-1:0] sq_entry(int unsigned k);
    logic signed [BO-1:0] v;
    v = BO'(k);
    return (2*BO)'(int'(v) * int'(v));
  endfunction

  logic [2*BO-1:0] table_q [DEPTH];

  for (genvar k = 0; k < int'(DEPTH); k++) begin : g_tab
    assign table_q[k] = sq_entry(k);
  end

  assign sq = table_q[$unsigned(d)];
endmodule
