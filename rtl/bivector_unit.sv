// bivector_unit: route-and-add stage of the Clifford multiplier for a
// bivector times a vector or trivector (either order).
//
// After the pre-swap the bivector is in the six-word register and the
// vector/trivector in the four-word register, so all 24 sub-products are
// used. Word i of a vector is e_i and word i of a trivector is the blade
// without e_i; bivector word k is the pair P(k) = {p, q}. By the XOR rule for
// blade masks:
//   * i in P(k): the product is grade 1 for a vector, grade 3 for a trivector,
//     and belongs to the field indexed by the other member of the pair
//     ("group X");
//   * i not in P(k): the product is grade 3 for a vector, grade 1 for a
//     trivector, and belongs to the field indexed by the one basis vector
//     absent from {i} and P(k) ("group Y").
// Each of the eight result fields is the sum of three sub-products. Part 1 is
// the vector and part 2 the trivector, so the groups exchange roles when the
// four-word operand is a trivector. Signs are already in the sub-products.
//
// Combinational. The unit and its result format (a vector and a trivector)
// follow the document; the routing is worked out here from the mask rule.
module bivector_unit
  import cliffosor_pkg::*;
(
  input  logic [23:0][WORD_W-1:0] sp,     // signed sub-products, index 6*i+j
  input  tag_t                    tag4,   // vector or trivector
  output homog_t                  part1,  // vector
  output homog_t                  part2   // trivector
);

  always_comb begin
    logic [3:0][WORD_W-1:0] gx, gy;
    logic [3:0] pm;
    int unsigned other, absent;
    gx = '0;
    gy = '0;
    for (int k = 0; k < 6; k++) begin
      pm = blade_mask(TAG_BIVECTOR, k);
      for (int i = 0; i < 4; i++) begin
        if (pm[i]) begin
          other = 0;
          for (int b = 0; b < 4; b++) if (pm[b] && b != i) other = b;
          gx[other] = coeff_t'(gx[other]) + coeff_t'(sp[6*i+k]);
        end else begin
          absent = 0;
          for (int b = 0; b < 4; b++) if (!pm[b] && b != i) absent = b;
          gy[absent] = coeff_t'(gy[absent]) + coeff_t'(sp[6*i+k]);
        end
      end
    end
    part1 = '0;
    part2 = '0;
    part1.tag = TAG_VECTOR;
    part2.tag = TAG_TRIVECTOR;
    if (tag4 == TAG_TRIVECTOR) begin
      part1.f[3:0] = gy;
      part2.f[3:0] = gx;
    end else begin
      part1.f[3:0] = gx;
      part2.f[3:0] = gy;
    end
  end

endmodule
