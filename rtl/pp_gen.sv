// pp_gen: partial product generator for one Booth row.
//
// A product generator forms the five multiples of the multiplicand Md that a
// radix-4 Booth digit can ask for: 0, +M, -M (two's complement of M), +2M (M
// shifted left one place) and -2M (the two's complement shifted left one
// place). A 5-to-1 multiplexer, steered by the Booth control word, passes one
// of them on. All multiples are N+2 bits wide, which holds -2M and +2M for any
// N-bit two's complement Md without overflow.
//
// Interface: md (N bits, two's complement), ctrl (booth_ctrl_t) in;
// pp (N+2 bits, two's complement) out.
// Timing: purely combinational.
// The five multiples and the multiplexer follow the document; the width of
// the output and forming -2M as (-M) shifted left are this design's choices.
module pp_gen
  import ffm_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] md,
  input  booth_ctrl_t  ctrl,
  output logic [N+1:0] pp
);

  logic [N+1:0] m_pos1, m_neg1, m_pos2, m_neg2;
  pp_sel_e      sel;

  // Product generator.
  assign m_pos1 = {{2{md[N-1]}}, md};
  assign m_neg1 = ~m_pos1 + 1'b1;
  assign m_pos2 = {m_pos1[N:0], 1'b0};
  assign m_neg2 = {m_neg1[N:0], 1'b0};

  // Decode the Booth control into the multiplexer select.
  always_comb begin
    unique case ({ctrl.neg, ctrl.two, ctrl.one})
      3'b001:  sel = PP_POS1;
      3'b010:  sel = PP_POS2;
      3'b101:  sel = PP_NEG1;
      3'b110:  sel = PP_NEG2;
      default: sel = PP_ZERO;
    endcase
  end

  // 5-to-1 multiplexer.
  always_comb begin
    unique case (sel)
      PP_POS1: pp = m_pos1;
      PP_NEG1: pp = m_neg1;
      PP_POS2: pp = m_pos2;
      PP_NEG2: pp = m_neg2;
      default: pp = '0;
    endcase
  end

endmodule : pp_gen
