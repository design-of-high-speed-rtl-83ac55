// gray_cell: final prefix operator of the parallel prefix adder.
//
// Merges a group (g_hi, p_hi) with a lower group that already reaches bit 0,
// whose generate g_lo is therefore the carry into the group. Only the group
// generate g = g_hi | (p_hi & g_lo) is formed: it is the carry out of the bit
// at the top of the group. Combinational.
// The equation is the one given for the gray cell of the carry generation stage.
module gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g
);

  assign g = g_hi | (p_hi & g_lo);

endmodule : gray_cell
