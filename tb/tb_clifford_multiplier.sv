// tb_clifford_multiplier: self-checking test of the multiplier unit.
//
// Runs every ordered pair of operand types (25) with the four product
// opcodes and random coefficients, several times each, and compares the
// result, summed into a 16-blade multivector, with the reference geometric
// product of ga_ref_pkg (grade-selected for outer product and contractions).
// It also checks the part tags, the error flag of bivector x bivector, and
// that product_we rises in the fifth clock after product_ce.
module tb_clifford_multiplier;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, we;
  opcode_t op;
  homog_t a, b;
  result_t res;
  int checks = 0, failures = 0;

  clifford_multiplier dut (.clk, .rst_n, .ce, .op, .a, .b, .we, .res);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(input opcode_t o, input homog_t x, input homog_t y);
    int lat;
    mv_t exp_mv, got;
    bit bb;
    @(negedge clk);
    op = o; a = x; b = y; ce = 1;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!we && lat < 20);
    check(lat == 5, $sformatf("latency %0d (op %0d tags %0d,%0d)", lat, o, x.tag, y.tag));
    bb = (x.tag == TAG_BIVECTOR && y.tag == TAG_BIVECTOR);
    if (bb) begin
      check(res.error && res.nparts == 0, "bivector x bivector flagged");
    end else begin
      exp_mv = ref_product(o, x, y);
      got    = result_mv(res);
      check(!res.error && mv_eq(exp_mv, got),
            $sformatf("value op %0d tags %0d*%0d", o, x.tag, y.tag));
      // part tags: every used part must carry only blades of its tag's grade
      if (o == OP_GP) begin
        int ga = tgrade(x.tag), gb = tgrade(y.tag);
        int nexp = (ga == 0 || ga == 4 || gb == 0 || gb == 4) ? 1 : 2;
        check(res.nparts == 2'(nexp), $sformatf("nparts %0d tags %0d*%0d", res.nparts, x.tag, y.tag));
        if (nexp == 2 && (ga == 2 || gb == 2))
          check(res.p1.tag == TAG_VECTOR && res.p2.tag == TAG_TRIVECTOR, "bivector unit part tags");
        if (nexp == 2 && ga != 2 && gb != 2)
          check(res.p1.tag == ((x.tag == y.tag) ? TAG_SCALAR : TAG_PSEUDO) &&
                res.p2.tag == TAG_BIVECTOR, "vector unit part tags");
      end else begin
        check(res.nparts == 1, "one part for outer/contraction");
      end
    end
    @(negedge clk);
    ce = 0;
    @(negedge clk);
    check(!we, "we falls with ce");
  endtask

  initial begin
    a = '0; b = '0; op = OP_GP;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a fixed case: e1 * e2 = e12 ; (2 e1) * (3 e2 + e1)
    begin
      homog_t x, y;
      x = '0; y = '0;
      x.tag = TAG_VECTOR; y.tag = TAG_VECTOR;
      x.f[0] = 32'sd2 <<< FRAC;
      y.f[0] = 32'sd1 <<< FRAC; y.f[1] = 32'sd3 <<< FRAC;
      run_one(OP_GP, x, y);
      check(res.p1.tag == TAG_SCALAR && res.p1.f[0] == (32'sd2 <<< FRAC), "2e1.(e1+3e2) scalar = 2");
      check(res.p2.tag == TAG_BIVECTOR && res.p2.f[0] == (32'sd6 <<< FRAC), "2e1^3e2 = 6 e12");
    end
    for (int rep = 0; rep < 6; rep++)
      for (int ta = 0; ta < 5; ta++)
        for (int tbb = 0; tbb < 5; tbb++)
          for (int o = 0; o < 4; o++)
            run_one(opcode_t'(o), rand_homog(tag_of(ta)), rand_homog(tag_of(tbb)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
