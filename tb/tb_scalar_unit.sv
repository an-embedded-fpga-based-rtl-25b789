// tb_scalar_unit: checks the field-to-field routing and the result tag of
// the scalar sub-unit for a scalar or pseudoscalar against every type.
module tb_scalar_unit;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  logic [23:0][31:0] sp;
  tag_t tag4, tag6;
  homog_t part;
  int checks = 0, failures = 0;

  scalar_unit dut (.sp, .tag4, .tag6, .part);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int s = 0; s < 2; s++)
        for (int y = 0; y < 5; y++) begin
          tag_t et;
          for (int n = 0; n < 24; n++) sp[n] = $urandom;
          tag4 = s ? TAG_PSEUDO : TAG_SCALAR;
          tag6 = tag_of(y);
          #1;
          et = s ? tag_of(4 - tgrade(tag6)) : tag6;
          checks++;
          if (part.tag !== et) begin failures++; $display("FAIL tag %0d %0d", s, y); end
          for (int j = 0; j < 6; j++) begin
            checks++;
            if (part.f[j] !== sp[j]) begin failures++; $display("FAIL field %0d", j); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
