// black_cell: prefix operator of the parallel prefix adder.
//
// Merges a higher group (g_hi, p_hi) with the adjacent lower group
// (g_lo, p_lo): group generate g = g_hi | (p_hi & g_lo) and group propagate
// p = p_hi & p_lo. Used where the merged group does not yet reach bit 0, so
// its propagate is still needed by a later level. Combinational.
// The equations are those given for the carry generation stage.
module black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);

  assign g = g_hi | (p_hi & g_lo);
  assign p = p_hi & p_lo;

endmodule : black_cell
