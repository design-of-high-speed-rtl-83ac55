// mbe_encoder: modified Booth (radix-4) encoder for an N-bit multiplier.
//
// The multiplier Mr is cut into N/2 overlapping three-bit groups
// {mr[2i+1], mr[2i], mr[2i-1]} (mr[-1] = 0); this is the selection of
// multiplier bits that feed each partial product row. Each group is the
// signed radix-4 digit d_i = -2*mr[2i+1] + mr[2i] + mr[2i-1], so that
// Mr = sum_i d_i * 4^i for a two's complement Mr. The digit leaves as a
// booth_ctrl_t (neg/two/one) that drives the 5-to-1 multiplexer of one
// partial product generator. The group 111 (digit 0) is encoded with neg
// clear so that a zero digit always has an all-zero control word.
//
// Interface: mr (N bits, two's complement) in, digit[N/2] out.
// Timing: purely combinational.
// Radix-4 Booth recoding into {0,+-1,+-2} follows the document; the three-bit
// control encoding and two's complement interpretation of Mr are this
// design's choices.
module mbe_encoder
  import ffm_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic        [N-1:0]   mr,
  output booth_ctrl_t [N/2-1:0] digit
);

  // Multiplier with the implicit zero below bit 0.
  logic [N:0] mr_ext;
  assign mr_ext = {mr, 1'b0};

  for (genvar i = 0; i < N/2; i++) begin : g_digit
    logic [2:0] grp;
    assign grp = mr_ext[2*i+2 -: 3];

    always_comb begin
      digit[i].one = grp[1] ^ grp[0];
      digit[i].two = (grp == 3'b011) || (grp == 3'b100);
      digit[i].neg = grp[2] & ~(grp[1] & grp[0]);
    end
  end

  initial assert (N % 2 == 0 && N >= 2)
    else $error("mbe_encoder: N must be even");

endmodule : mbe_encoder
