// tb_clifford_adder: sums and differences of random elements of every pair
// of types, compared blade by blade with the reference; checks one part for
// equal types and a two-part composition (A first) otherwise, and that
// sum_we rises in the third clock after sum_ce.
module tb_clifford_adder;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, sub = 0, we;
  homog_t a, b;
  result_t res;
  int checks = 0, failures = 0;

  clifford_adder dut (.clk, .rst_n, .ce, .sub, .a, .b, .we, .res);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 8; rep++)
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          for (int s = 0; s < 2; s++) begin
            int lat;
            homog_t ha, hb;
            ha = rand_homog(tag_of(x));
            hb = rand_homog(tag_of(y));
            // garbage in unused fields must be ignored
            if (ref_nfields(ha.tag) < 6) ha.f[5] = 32'hdead_beef;
            @(negedge clk);
            a = ha; b = hb; sub = s[0]; ce = 1;
            lat = 0;
            do begin @(posedge clk); lat++; #1; end while (!we && lat < 20);
            ha.f[5] = (ref_nfields(ha.tag) < 6) ? '0 : ha.f[5];
            check(lat == 3, $sformatf("latency %0d", lat));
            check(mv_eq(result_mv(res), ref_sum(s[0], ha, hb)), $sformatf("value %0d %0d sub %0d", x, y, s));
            if (x == y) check(res.nparts == 1 && res.p1.tag == ha.tag, "same type: one part");
            else check(res.nparts == 2 && res.p1.tag == ha.tag && res.p2.tag == hb.tag, "composition");
            @(negedge clk);
            ce = 0;
            @(negedge clk);
            check(!we, "we falls");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
