// scalar_unit: route stage of the Clifford multiplier for products with a
// scalar or a pseudoscalar.
//
// After the pre-swap the single-field operand (scalar or pseudoscalar) sits in
// word 0 of the four-word register, so the only useful sub-products are
// sp[0*6+j], j = 0..5: word 0 times each word of the six-word register. They
// go field to field into a single result part; no sums are needed. The
// result grade is the other operand's grade for a scalar, and four minus it
// for a pseudoscalar (the dual). Thanks to the field order of the element
// format the dual of a vector/trivector keeps its field positions; the dual
// of a bivector reverses them, which the multiplier's post-swap stage does.
//
// Combinational. The unit and its role follow the document; the result-tag
// logic is written here from the grade rule.
module scalar_unit
  import cliffosor_pkg::*;
(
  input  logic [23:0][WORD_W-1:0] sp,     // signed sub-products, index 6*i+j
  input  tag_t                    tag4,   // single-field operand (scalar/pseudo)
  input  tag_t                    tag6,   // other operand
  output homog_t                  part
);

  always_comb begin
    part = '0;
    if (tag4 == TAG_PSEUDO) part.tag = grade_tag(3'd4 - tag_grade(tag6));
    else                    part.tag = tag6;
    for (int j = 0; j < 6; j++) part.f[j] = sp[j];
  end

endmodule
