// finite_field_mul_ppa: N x N -> 2N bit multiplier built from a modified Booth
// partial product generator and parallel prefix adders.
//
// Datapath:
//  1. mbe_encoder recodes the multiplier b into N/2 radix-4 Booth digits
//     in {0,+1,-1,+2,-2}, one per partial product row.
//  2. One pp_gen per row forms 0, +-a or +-2a under its digit's control.
//     Row i is sign-extended to 2N bits and weighted by 4^i (shifted left 2i).
//  3. The rows are summed by a chain of N/2-1 ppa_adder instances, each
//     2N bits wide: s1 = row0 + row1, s_k = s_(k-1) + row_k. The last running
//     sum s_(N/2-1) is the 2N-bit product.
//  4. The product is captured in an output register on the rising edge of clk.
//
// Operands and product are two's complement: c = a * b exactly, for every
// pair of N-bit signed inputs.
//
// Interface: clk; a, b (N bits each); c (2N bits). There is no reset and no
// handshake: c holds the product of the a and b present before the latest
// rising edge, so the latency is one clock cycle and a new pair can be
// applied every cycle.
//
// Following the document: the 32-bit operands and 64-bit product, the Booth
// partial product generation with a 5-to-1 multiplexer, the parallel prefix
// adders, and running sums s1, s2, ... formed one after another. This
// design's own choices: signed operands, the ripple chain of prefix adders
// (rather than a tree), and the single output register. The document's
// "finite field" title notwithstanding, the arithmetic is ordinary integer
// multiplication (3 x 3 gives 9), as in its simulation.
module finite_field_mul_ppa
  import ffm_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic           clk,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);

  localparam int unsigned ROWS = N / 2;
  localparam int unsigned W    = 2 * N;

  booth_ctrl_t [ROWS-1:0] digit;
  logic        [N+1:0]    pp  [ROWS];
  logic        [W-1:0]    row [ROWS];
  // s[0] is row 0; s[k] is the running sum of rows 0..k (s1, s2, ...).
  logic        [W-1:0]    s   [ROWS];

  // Booth encoding of the multiplier.
  mbe_encoder #(.N(N)) u_enc (
    .mr    (b),
    .digit (digit)
  );

  // Partial product rows, sign-extended and weighted by 4^i.
  for (genvar i = 0; i < ROWS; i++) begin : g_row
    pp_gen #(.N(N)) u_ppg (
      .md   (a),
      .ctrl (digit[i]),
      .pp   (pp[i])
    );

    logic [W-1:0] ext;
    assign ext    = W'($signed(pp[i]));
    assign row[i] = ext << (2 * i);
  end

  // Chain of parallel prefix adders.
  assign s[0] = row[0];
  for (genvar k = 1; k < ROWS; k++) begin : g_sum
    logic unused_cout;
    ppa_adder #(.WIDTH(W)) u_ppa (
      .a    (s[k-1]),
      .b    (row[k]),
      .sum  (s[k]),
      .cout (unused_cout)
    );
  end

  // Output register.
  always_ff @(posedge clk) begin
    c <= s[ROWS-1];
  end

  initial assert (N % 2 == 0 && N >= 4)
    else $error("finite_field_mul_ppa: N must be even and at least 4");

endmodule : finite_field_mul_ppa
