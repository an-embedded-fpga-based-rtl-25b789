// vector_unit: route-and-add stage of the Clifford multiplier for
// (vector or trivector) x (vector or trivector).
//
// Both operands have four fields, so 16 of the 24 sub-products are used.
// The diagonal products sp[i][i] all land on the same blade (the scalar when
// both operands have the same type, the pseudoscalar otherwise) and are
// summed into part 1. Each off-diagonal pair sp[i][j] + sp[j][i] lands on the
// bivector blade e_i e_j and is summed into the field of part 2 that holds
// that blade (vector x vector order). For vector x trivector and trivector x
// vector the bivector lands on the complementary blade; the multiplier's
// post-swap stage reverses the six fields to fix that. Signs are already in
// the sub-products.
//
// Combinational. Structure and result format (a scalar or pseudoscalar and a
// bivector) follow the document.
module vector_unit
  import cliffosor_pkg::*;
(
  input  logic [23:0][WORD_W-1:0] sp,     // signed sub-products, index 6*i+j
  input  tag_t                    tag4,
  input  tag_t                    tag6,
  output homog_t                  part1,  // scalar or pseudoscalar
  output homog_t                  part2   // bivector
);

  always_comb begin
    coeff_t acc;
    part1 = '0;
    part2 = '0;
    part1.tag = (tag4 == tag6) ? TAG_SCALAR : TAG_PSEUDO;
    part2.tag = TAG_BIVECTOR;
    acc = '0;
    for (int i = 0; i < 4; i++) acc = acc + coeff_t'(sp[6*i+i]);
    part1.f[0] = acc;
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++)
        part2.f[pair_field(i, j)] = coeff_t'(sp[6*i+j]) + coeff_t'(sp[6*j+i]);
  end

endmodule
