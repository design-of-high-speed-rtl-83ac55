// ffm_pkg: types shared by the Booth multiplier.
//
// booth_ctrl_t is the control word that the modified-Booth (radix-4) encoder
// hands to each partial product generator. One Booth digit d in {0,+1,-1,+2,-2}
// is carried as three bits: `one` selects the multiplicand M, `two` selects 2M,
// and `neg` takes the two's complement of the selected multiple. Neither of
// one/two set means the digit is zero. The split into these three bits is this
// design's choice; the multiplexer selection it drives is the one described for
// the design (0, 1, -1, 2, -2 times the multiplicand).
package ffm_pkg;

  typedef struct packed {
    logic neg;  // negate the selected multiple
    logic two;  // select 2M
    logic one;  // select M
  } booth_ctrl_t;

  // Five inputs of the partial product multiplexer.
  typedef enum logic [2:0] {
    PP_ZERO  = 3'd0,
    PP_POS1  = 3'd1,
    PP_NEG1  = 3'd2,
    PP_POS2  = 3'd3,
    PP_NEG2  = 3'd4
  } pp_sel_e;

endpackage : ffm_pkg
