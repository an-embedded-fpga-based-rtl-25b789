// tb_cliffosor_top: end-to-end test of the coprocessor core at its default
// parameters, acting as the host. For each operation it writes the 15-word
// instruction vector into the four SRAM bank models, sends the control byte,
// waits for the status byte and reads the 15-word result vector back, then
// compares it with the reference model. It runs every product opcode and the
// sum and difference on all 25 ordered type pairs, random 3D rotations, and
// an unknown opcode. Each mechanism of the design is counted inside the core
// (pre-swap, post-swap, the scalar/vector/bivector sub-units, the
// bivector x bivector rejection, grade selection for outer product and both
// contractions, same-type sums, compositions, differences, rotations,
// unknown opcodes, error status, an ALU reset between rotations); one that
// never happens counts a failure.
// The ALU cycles (cs to w_ack) are checked against 7/5/7 and the interface
// cycles (control byte to status byte, less the ALU cycles) are reported.
module tb_cliffosor_top;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  localparam int AW = 19;
  localparam int IA = 0, RA = 4;

  logic clk = 0, rst_n = 0, ctrl_valid = 0, reset_alu = 0;
  logic [7:0] ctrl_byte = 0, status_byte;
  logic status_valid;
  logic [3:0][AW-1:0] sram_addr;
  logic [3:0] sram_we, sram_re;
  logic [3:0][31:0] sram_wdata, sram_rdata;
  int checks = 0, failures = 0;

  cliffosor_top dut (.*);

  for (genvar k = 0; k < 4; k++) begin : g_bank
    sram_bank_model #(.ADDR_W(AW)) u_sram (
      .clk, .addr(sram_addr[k]), .we(sram_we[k]), .re(sram_re[k]),
      .wdata(sram_wdata[k]), .rdata(sram_rdata[k]));
  end

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] peek(input int w);
    case (w % 4)
      0: return g_bank[0].u_sram.mem[RA + w / 4];
      1: return g_bank[1].u_sram.mem[RA + w / 4];
      2: return g_bank[2].u_sram.mem[RA + w / 4];
      default: return g_bank[3].u_sram.mem[RA + w / 4];
    endcase
  endfunction
  task automatic poke(input int w, input logic [31:0] d);
    case (w % 4)
      0: g_bank[0].u_sram.mem[IA + w / 4] = d;
      1: g_bank[1].u_sram.mem[IA + w / 4] = d;
      2: g_bank[2].u_sram.mem[IA + w / 4] = d;
      default: g_bank[3].u_sram.mem[IA + w / 4] = d;
    endcase
  endtask

  // ---------------------------------------------------------- mechanisms
  localparam int NMECH = 15;
  string mech_name [NMECH] = '{"pre-swap", "post-swap", "scalar unit", "vector unit",
                               "bivector unit", "bivector x bivector rejected",
                               "outer product", "left contraction", "right contraction",
                               "same-type sum", "composition", "difference",
                               "rotation", "unknown opcode", "ALU reset between operations"};
  int mech [NMECH];
  initial foreach (mech[i]) mech[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_alu.u_mul.start && dut.u_alu.u_mul.swap_c) mech[0]++;
    if (dut.u_alu.u_mul.v4 && dut.u_alu.u_mul.s4_post)   mech[1]++;
    if (dut.u_alu.u_mul.v3) begin
      if (dut.u_alu.u_mul.s3_mode == 0) mech[2]++;
      if (dut.u_alu.u_mul.s3_mode == 1) mech[3]++;
      if (dut.u_alu.u_mul.s3_mode == 2) mech[4]++;
      if (dut.u_alu.u_mul.s3_mode == 3) mech[5]++;
    end
    if (dut.u_alu.u_mul.v5) begin
      if (dut.u_alu.u_mul.s5_op == OP_OUTER) mech[6]++;
      if (dut.u_alu.u_mul.s5_op == OP_LCONT) mech[7]++;
      if (dut.u_alu.u_mul.s5_op == OP_RCONT) mech[8]++;
    end
    if (dut.u_alu.u_add.v3 &&  dut.u_alu.u_add.s_same) mech[9]++;
    if (dut.u_alu.u_add.v3 && !dut.u_alu.u_add.s_same) mech[10]++;
    if (dut.u_alu.u_add.v1 && dut.u_alu.u_add.f_sub)   mech[11]++;
    if (dut.u_alu.u_rot.v5) mech[12]++;
    if (dut.u_alu.load_result && dut.u_alu.bad_op) mech[13]++;
    if (reset_alu && !dut.cs) mech[14]++;
  end

  // ALU cycles: from the edge that samples cs to the edge that raises w_ack
  int alu_cyc = 0, last_alu = 0;
  always @(posedge clk) begin
    if (dut.cs && !dut.w_ack) alu_cyc <= alu_cyc + 1;
    if (dut.cs && dut.w_ack && alu_cyc != 0) begin last_alu <= alu_cyc; alu_cyc <= 0; end
  end

  int n_err_status = 0, if_cycles = 0;

  // Run one instruction through the host protocol; returns the result vector.
  task automatic host_op(input int o, input homog_t a, input homog_t b, input logic [7:0] rid,
                         output logic [31:0] rv [15], output logic [7:0] st);
    instr_t in;
    int cyc = 0;
    in = '0;
    in.opcode = 4'(o); in.id_r = rid; in.id_a = a.id; in.id_b = b.id;
    poke(0, in);
    poke(1, {21'b0, a.id, a.tag});
    for (int k = 0; k < 6; k++) poke(2 + k, a.f[k]);
    poke(8, {21'b0, b.id, b.tag});
    for (int k = 0; k < 6; k++) poke(9 + k, b.f[k]);
    @(negedge clk);
    ctrl_valid = 1; ctrl_byte = 8'h01;
    @(negedge clk);
    ctrl_valid = 0;
    while (!status_valid && cyc < 200) begin @(posedge clk); #1; cyc++; end
    if_cycles = cyc + 1;
    st = status_byte;
    check(status_valid, "status byte arrives");
    for (int w = 0; w < 15; w++) rv[w] = peek(w);
    repeat (2) @(negedge clk);
  endtask

  function automatic result_t decode(input logic [31:0] rv [15]);
    result_t r;
    r = '0;
    r.p1.id = rv[0][10:3]; r.p1.tag = tag_t'(rv[0][2:0]);
    r.p2.id = rv[7][10:3]; r.p2.tag = tag_t'(rv[7][2:0]);
    for (int k = 0; k < 6; k++) begin r.p1.f[k] = rv[1+k]; r.p2.f[k] = rv[8+k]; end
    r.nparts = rv[14][1:0];
    r.error  = rv[14][2];
    return r;
  endfunction

  initial begin
    logic [31:0] rv [15];
    logic [7:0] st;
    result_t r;
    int want;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int o = 0; o < 6; o++)
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) begin
          homog_t a, b;
          logic [7:0] rid;
          bit bb;
          a = rand_homog(tag_of(x));
          b = rand_homog(tag_of(y));
          rid = 8'($urandom);
          host_op(o, a, b, rid, rv, st);
          r = decode(rv);
          bb = (o <= 3) && x == 2 && y == 2;
          want = (o <= 3) ? 7 : 5;
          check(last_alu == want, $sformatf("ALU cycles %0d for opcode %0d", last_alu, o));
          check(st == (bb ? 8'h03 : 8'h01), "status byte value");
          if (bb) begin n_err_status++; check(r.error && r.nparts == 0, "bivector x bivector error"); end
          else begin
            mv_t e;
            e = (o <= 3) ? ref_product(opcode_t'(o), a, b) : ref_sum(o == 5, a, b);
            check(mv_eq(result_mv(r), e), $sformatf("value opcode %0d tags %0d %0d", o, x, y));
            check(r.p1.id == rid && rv[14][15:8] == rid && rv[14][7:4] == 4'(o), "ids and opcode");
          end
        end
    // rotations
    for (int rep = 0; rep < 20; rep++) begin
      homog_t a, b;
      real q[4], v[3], o3[3], n, th;
      int tmp;
      a = '0; b = '0;
      a.tag = TAG_VECTOR; b.tag = TAG_BIVECTOR;
      th = $urandom_range(0, 62831) / 10000.0;
      for (int k = 1; k < 4; k++) begin tmp = $urandom_range(0, 2000); q[k] = (tmp - 1000) / 1000.0; end
      n = $sqrt(q[1]*q[1] + q[2]*q[2] + q[3]*q[3]) + 1e-9;
      q[0] = $cos(th / 2.0);
      for (int k = 1; k < 4; k++) q[k] = q[k] / n * $sin(th / 2.0);
      for (int k = 0; k < 4; k++) begin tmp = $rtoi(q[k] * 65536.0); b.f[k] = tmp; q[k] = $itor(tmp) / 65536.0; end
      for (int k = 0; k < 3; k++) begin
        tmp = $urandom_range(0, 20000); tmp = (tmp - 10000) * 65536 / 1000;
        a.f[k] = tmp; v[k] = $itor(tmp) / 65536.0;
      end
      ref_rotate(q, v, o3);
      if (rep % 2 == 1) begin   // reset the ALU alone while it is idle
        reset_alu = 1;
        repeat (2) @(negedge clk);
        reset_alu = 0;
      end
      host_op(6, a, b, 8'(rep), rv, st);
      r = decode(rv);
      check(last_alu == 7, $sformatf("ALU cycles %0d for rotation", last_alu));
      check(st == 8'h01 && r.nparts == 1 && r.p1.tag == TAG_VECTOR, "rotation result format");
      for (int k = 0; k < 3; k++) begin
        int d;
        tmp = r.p1.f[k];
        d = tmp - $rtoi(o3[k] * 65536.0);
        check(d < 128 && d > -128, $sformatf("rotation component %0d off by %0d", k, d));
      end
    end
    // unknown opcode
    host_op(12, rand_homog(TAG_VECTOR), rand_homog(TAG_VECTOR), 8'h5a, rv, st);
    r = decode(rv);
    check(st == 8'h03 && r.error && r.nparts == 0, "unknown opcode rejected");
    if (st == 8'h03) n_err_status++;
    check(n_err_status == 5, "error status seen for each rejected operation");
    $display("control byte to status byte: %0d clocks, of which %0d in the ALU and %0d in the interface",
             if_cycles, last_alu, if_cycles - last_alu);
    foreach (mech[i]) begin
      $display("mechanism %-30s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, {"mechanism never happened: ", mech_name[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
