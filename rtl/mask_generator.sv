// mask_generator: sign look-up table of the Clifford multiplier.
//
// The multiplier forms all 24 products between the words of its four-word
// register (index i) and its six-word register (index j). Bit 6*i+j of
// `mask` is set when that product must be negated so that it lands with the
// right sign on a canonically ordered result blade. The table is addressed
// by the two operand tags in instruction order; it accounts for the pre-swap
// (which puts operand B in the four-word register) and for the order of the
// basis vectors in each blade under a Euclidean signature (every e_i squares
// to +1). The sign of the coefficients themselves is left to the two's
// complement multipliers.
//
// Purely combinational: a 6-bit address (two tags) to a 24-bit word, so it
// maps to a small ROM. The document states what the table depends on but not
// its contents; they are derived here from the blade bit masks and the
// reordering sign, and the bit numbering 6*i+j is this design's choice.
module mask_generator
  import cliffosor_pkg::*;
(
  input  tag_t        tag_a,
  input  tag_t        tag_b,
  output logic        swap,
  output logic [23:0] mask
);

  always_comb begin
    swap = needs_preswap(tag_a, tag_b);
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 6; j++) begin
        if (swap) mask[6*i+j] = blade_neg(blade_mask(tag_a, j), blade_mask(tag_b, i));
        else      mask[6*i+j] = blade_neg(blade_mask(tag_a, i), blade_mask(tag_b, j));
      end
    end
  end

endmodule
