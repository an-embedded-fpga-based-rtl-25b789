// tb_clifford_alu: end-to-end test of the Clifford ALU. Issues random
// instructions of every opcode (products on every type pair, sums and
// differences, rotations, an unknown opcode) and checks the result against
// the reference model, the result ID in both parts, and the number of clocks
// from the edge that samples cs to the edge that raises w_ack: 7 for
// products and rotations, 5 for sums and differences, 2 for unknown opcodes.
module tb_clifford_alu;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  logic clk = 0, rst_n = 0, cs = 0, w_ack;
  instr_t instr, result_instr;
  homog_t op_a, op_b;
  result_t result;
  int checks = 0, failures = 0;

  clifford_alu dut (.clk, .rst_n, .reset_alu(1'b0), .cs, .instr, .op_a, .op_b,
                    .w_ack, .result, .result_instr);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic run(input int o, input homog_t a, input homog_t b);
    int lat = 0, want;
    mv_t e;
    instr = '0;
    instr.opcode = 4'(o);
    instr.id_r = 8'($urandom);
    instr.id_a = a.id;
    instr.id_b = b.id;
    @(negedge clk);
    op_a = a; op_b = b; cs = 1;
    do begin @(posedge clk); lat++; #1; end while (!w_ack && lat < 30);
    want = (o <= 3 || o == 6) ? 7 : (o <= 5 ? 5 : 2);
    check(lat == want, $sformatf("latency %0d for opcode %0d", lat, o));
    check(result_instr == instr, "result belongs to the instruction");
    if (o <= 5) begin
      if (o <= 3) e = ref_product(opcode_t'(o), a, b);
      else        e = ref_sum(o == 5, a, b);
      if (o <= 3 && a.tag == TAG_BIVECTOR && b.tag == TAG_BIVECTOR)
        check(result.error, "bivector x bivector error");
      else
        check(!result.error && mv_eq(result_mv(result), e), $sformatf("value opcode %0d tags %0d %0d", o, a.tag, b.tag));
      check(result.p1.id == instr.id_r && (result.nparts < 2 || result.p2.id == instr.id_r), "result id");
    end else if (o > 6) begin
      check(result.error && result.nparts == 0, "unknown opcode flagged");
    end
    // keep cs a few clocks: nothing must change
    repeat (2) @(posedge clk);
    @(negedge clk);
    cs = 0;
    @(negedge clk);
  endtask

  initial begin
    op_a = '0; op_b = '0; instr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int o = 0; o < 6; o++)
        for (int x = 0; x < 5; x++)
          for (int y = 0; y < 5; y++)
            run(o, rand_homog(tag_of(x)), rand_homog(tag_of(y)));
    // rotation: quarter turn in the e1e2 plane takes 3 e1 to 3 e2
    begin
      homog_t v, r;
      int x0, x1;
      v = '0; r = '0;
      v.tag = TAG_VECTOR; v.f[0] = 32'sd3 <<< 16;
      r.tag = TAG_BIVECTOR; r.f[0] = 32'sd46341; r.f[1] = -32'sd46341;
      run(6, v, r);
      x0 = result.p1.f[0];
      x1 = result.p1.f[1];
      check(result.p1.tag == TAG_VECTOR && x1 > 196500 && x1 < 196700 &&
            x0 < 100 && x0 > -100, $sformatf("rotation e1 -> e2: %0d %0d", x0, x1));
    end
    run(9, rand_homog(TAG_VECTOR), rand_homog(TAG_VECTOR));
    run(15, rand_homog(TAG_VECTOR), rand_homog(TAG_VECTOR));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
