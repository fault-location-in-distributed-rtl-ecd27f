// Test words of the two-phase fault-location procedure for one PE.
//
// Phase 1 (phase = 0) sets every box straight: the routing tag is the PE's
// own address. Phase 2 (phase = 1) sets every box to exchange: the tag is the
// complement of the address. The address sits in bits LOGN-1..0 of the tag
// word and all other bits are 0. The first data word is the bitwise
// complement of the tag word; the second complements bits 0 and 8 of the
// first (the low bit of each byte) so that both parity lines see both values.
// Each word comes with its even parity per byte. Example, PE 6, phase 1:
// 16'h0006 / 2'b00, 16'hFFF9 / 2'b00, 16'hFEF8 / 2'b11.
//
// A destination d expects, in either phase, the words this block gives for
// address d in phase 1, so the same block also serves as the reference for
// checking received words. Purely combinational.
module test_pattern_gen
  import dcn_pkg::*;
#(
  parameter int unsigned LOGN = N_STG
) (
  input  logic [LOGN-1:0]   addr,
  input  logic              phase,   // 0: phase 1 (straight), 1: phase 2 (exchange)
  input  logic [1:0]        sel,     // 0: tag word, 1: first data word, 2: second data word
  output logic [M_BITS-1:0] word,
  output logic [P_BITS-1:0] par
);

  logic [M_BITS-1:0] tag, w1, w2, flip;

  always_comb begin
    tag = '0;
    tag[LOGN-1:0] = phase ? ~addr : addr;
    w1 = ~tag;
    flip = '0;
    for (int k = 0; k < P_BITS; k++) flip[8*k] = 1'b1;
    w2 = w1 ^ flip;
    unique case (sel)
      2'd0:    word = tag;
      2'd1:    word = w1;
      default: word = w2;
    endcase
    par = byte_parity(word);
  end

endmodule
