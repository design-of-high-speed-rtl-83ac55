// ppa_adder: WIDTH-bit parallel prefix adder (Kogge-Stone prefix tree).
//
// Three stages:
//  - pre-processing: per bit, propagate p_i = a_i ^ b_i and generate
//    g_i = a_i & b_i;
//  - carry generation: LEVELS = ceil(log2(WIDTH)) levels of prefix cells. At
//    level l, bit i (i >= 2^l) merges its group with the group ending at bit
//    i - 2^l. A black cell (generate and propagate) is used while the merged
//    group does not yet start at bit 0; a gray cell (generate only) is used
//    where it does, and its output is the final carry out of bit i. Bits below
//    2^l pass through unchanged;
//  - post-processing: s_i = p_i ^ c_(i-1), with no carry into bit 0.
//
// Interface: a, b (WIDTH bits) in; sum (WIDTH bits, a + b mod 2^WIDTH) and
// cout (carry out of bit WIDTH-1) out. Timing: purely combinational, with a
// carry depth of LEVELS cells.
// The three stages and the cell equations follow the document; the
// Kogge-Stone wiring of the tree and the absence of a carry input are this
// design's choices.
module ppa_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  // Group generate / propagate after each level; index 0 is the
  // pre-processing output.
  logic [WIDTH-1:0] g [LEVELS+1];
  logic [WIDTH-1:0] p [LEVELS+1];

  // Pre-processing stage.
  assign p[0] = a ^ b;
  assign g[0] = a & b;

  // Carry generation stage.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned DIST = 1 << l;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i < DIST) begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end else if (i < 2*DIST) begin : g_gray
        // Lower group [i-DIST : 0] already starts at bit 0.
        gray_cell u_gray (
          .g_hi (g[l][i]),
          .p_hi (p[l][i]),
          .g_lo (g[l][i-DIST]),
          .g    (g[l+1][i])
        );
        // Propagate of a finished group is no longer used.
        assign p[l+1][i] = p[l][i];
      end else begin : g_black
        black_cell u_black (
          .g_hi (g[l][i]),
          .p_hi (p[l][i]),
          .g_lo (g[l][i-DIST]),
          .p_lo (p[l][i-DIST]),
          .g    (g[l+1][i]),
          .p    (p[l+1][i])
        );
      end
    end
  end

  // Carry out of each bit: generate of the group [i:0].
  logic [WIDTH-1:0] carry;
  assign carry = g[LEVELS];

  // Post-processing stage.
  if (WIDTH > 1) begin : g_post
    assign sum = p[0] ^ {carry[WIDTH-2:0], 1'b0};
  end else begin : g_post1
    assign sum = p[0];
  end
  assign cout = carry[WIDTH-1];

endmodule : ppa_adder
