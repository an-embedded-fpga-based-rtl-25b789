// tb_mask_generator: checks the sign look-up table for all 25 tag pairs.
//
// For each pair the expected pre-swap is the rule "first operand is a
// bivector, or has four fields while the second has one"; the expected bit
// 6*i+j is the sign, from the reference sorting method, of the product of the
// two blades in instruction order that meet in four-word slot i and six-word
// slot j. Only slots that hold a blade of their operand are compared.
module tb_mask_generator;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  tag_t tag_a, tag_b;
  logic swap;
  logic [23:0] mask;
  int checks = 0, failures = 0;

  mask_generator dut (.tag_a, .tag_b, .swap, .mask);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) begin
        bit exp_swap;
        int ga, gb;
        tag_a = tag_of(x);
        tag_b = tag_of(y);
        #1;
        ga = tgrade(tag_a); gb = tgrade(tag_b);
        exp_swap = (ga == 2) || ((ga == 1 || ga == 3) && (gb == 0 || gb == 4));
        checks++;
        if (swap !== exp_swap) begin failures++; $display("FAIL swap %0d %0d", x, y); end
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 6; j++) begin
            int ma, mb;
            ma = exp_swap ? ref_mask(tag_a, j) : ref_mask(tag_a, i);
            mb = exp_swap ? ref_mask(tag_b, i) : ref_mask(tag_b, j);
            if (ma >= 0 && mb >= 0) begin
              checks++;
              if (mask[6*i+j] !== (ref_sign(ma, mb) < 0)) begin
                failures++;
                $display("FAIL sign tags %0d %0d slot %0d,%0d", x, y, i, j);
              end
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
