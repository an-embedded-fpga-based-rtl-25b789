// tb_bivector_unit: checks the route-and-add of the bivector sub-unit. Each
// of the 24 random sub-products is sent, in the reference, to the blade
// given by XOR of the four-word operand's blade (vector or trivector) and the
// bivector blade, and summed into the vector or trivector field holding that
// blade; the unit's two parts must match.
module tb_bivector_unit;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  logic [23:0][31:0] sp;
  tag_t tag4;
  homog_t part1, part2;
  int checks = 0, failures = 0;

  bivector_unit dut (.sp, .tag4, .part1, .part2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 40; rep++) begin
      int ev [4];
      int et [4];
      for (int n = 0; n < 24; n++) sp[n] = $urandom;
      tag4 = rep[0] ? TAG_TRIVECTOR : TAG_VECTOR;
      #1;
      foreach (ev[k]) begin ev[k] = 0; et[k] = 0; end
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 6; k++) begin
          int m;
          m = ref_mask(tag4, i) ^ ref_mask(TAG_BIVECTOR, k);
          for (int f = 0; f < 4; f++) begin
            if (ref_mask(TAG_VECTOR, f) == m)    ev[f] += int'(sp[6*i+k]);
            if (ref_mask(TAG_TRIVECTOR, f) == m) et[f] += int'(sp[6*i+k]);
          end
        end
      checks += 2;
      if (part1.tag !== TAG_VECTOR) begin failures++; $display("FAIL tag1"); end
      if (part2.tag !== TAG_TRIVECTOR) begin failures++; $display("FAIL tag2"); end
      for (int f = 0; f < 4; f++) begin
        checks += 2;
        if (int'(part1.f[f]) != ev[f]) begin failures++; $display("FAIL vec %0d", f); end
        if (int'(part2.f[f]) != et[f]) begin failures++; $display("FAIL tri %0d", f); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
