// tb_vector_unit: checks the route-and-add of the vector sub-unit. For
// random signed sub-products, the expected scalar/pseudoscalar field is the
// sum of the products of equal slots, and each bivector field is the sum of
// the products whose vector blades XOR to that field's mask in the reference
// blade table.
module tb_vector_unit;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  logic [23:0][31:0] sp;
  tag_t tag4, tag6;
  homog_t part1, part2;
  int checks = 0, failures = 0;

  vector_unit dut (.sp, .tag4, .tag6, .part1, .part2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 40; rep++) begin
      int e1;
      int eb [6];
      for (int n = 0; n < 24; n++) sp[n] = $urandom;
      tag4 = rep[0] ? TAG_TRIVECTOR : TAG_VECTOR;
      tag6 = rep[1] ? TAG_TRIVECTOR : TAG_VECTOR;
      #1;
      e1 = 0;
      foreach (eb[k]) eb[k] = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          int m;
          m = ref_mask(TAG_VECTOR, i) ^ ref_mask(TAG_VECTOR, j);
          if (i == j) e1 += int'(sp[6*i+j]);
          else for (int k = 0; k < 6; k++) if (ref_mask(TAG_BIVECTOR, k) == m) eb[k] += int'(sp[6*i+j]);
        end
      checks += 3;
      if (part1.tag !== ((tag4 == tag6) ? TAG_SCALAR : TAG_PSEUDO)) begin failures++; $display("FAIL tag1"); end
      if (part2.tag !== TAG_BIVECTOR) begin failures++; $display("FAIL tag2"); end
      if (int'(part1.f[0]) != e1) begin failures++; $display("FAIL diag"); end
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (int'(part2.f[k]) != eb[k]) begin failures++; $display("FAIL biv %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
