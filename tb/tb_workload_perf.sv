// tb_workload_perf: throughput workloads run through the whole core at its
// default parameters, acting as the host.
//
// Four workloads, each a stream of single instructions written into the SRAM
// bank models, started with the control byte and collected after the status
// byte:
//   products   geometric products of random homogeneous elements, drawn from
//              the 24 type pairs the hardware executes
//   sums       sums and differences of random elements, all 25 type pairs
//   rotations  random 3D vectors rotated by random unit rotors
//   raytracer  the operation mix of a small raytracer: 2 sums/differences
//              for every 11 vector-bivector left contractions
// Every result is compared with the reference model, and every operation's
// ALU latency (edge sampling cs to w_ack) is checked: 7 clocks for products
// and rotations, 5 for sums. The total clocks per workload and the
// clocks per operation are printed.
//
// N_OPS (500,000) is the stream length of the original evaluation for the
// first three workloads. The raytracer stream uses the same length: the
// image it stands for needs about 13 million operations, more than a
// simulation run of a few minutes can take, and the mix, not the length,
// is what distinguishes it. The clocks printed per operation include the
// clocks the host model spends between operations.
module tb_workload_perf;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  localparam int AW = 19;
  localparam int IA = 0, RA = 4;
  localparam int N_OPS = 500000;

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

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (4 * N_OPS * 40 + 1000) @(posedge clk);
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

  // ALU cycles: from the edge that samples cs to the edge that raises w_ack
  int alu_cyc = 0, last_alu = 0;
  always @(posedge clk) begin
    if (dut.cs && !dut.w_ack) alu_cyc <= alu_cyc + 1;
    if (dut.cs && dut.w_ack && alu_cyc != 0) begin last_alu <= alu_cyc; alu_cyc <= 0; end
  end

  // One instruction through the host protocol; returns the decoded result.
  task automatic host_op(input opcode_t o, input homog_t a, input homog_t b,
                         output result_t r, output logic [7:0] st);
    instr_t in;
    logic [31:0] rv [15];
    int cyc = 0;
    in = '0;
    in.opcode = o; in.id_r = 8'hc5; in.id_a = a.id; in.id_b = b.id;
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
    st = status_byte;
    for (int w = 0; w < 15; w++) rv[w] = peek(w);
    r = '0;
    r.p1.id = rv[0][10:3]; r.p1.tag = tag_t'(rv[0][2:0]);
    r.p2.id = rv[7][10:3]; r.p2.tag = tag_t'(rv[7][2:0]);
    for (int k = 0; k < 6; k++) begin r.p1.f[k] = rv[1+k]; r.p2.f[k] = rv[8+k]; end
    r.nparts = rv[14][1:0];
    r.error  = rv[14][2];
    @(negedge clk);
  endtask

  task automatic do_product(input opcode_t o, input homog_t a, input homog_t b);
    result_t r;
    logic [7:0] st;
    host_op(o, a, b, r, st);
    check(st == 8'h01 && !r.error, "product status");
    check(last_alu == 7, $sformatf("product ALU cycles %0d", last_alu));
    check(mv_eq(result_mv(r), ref_product(o, a, b)), $sformatf("product op %0d tags %0d %0d", o, a.tag, b.tag));
  endtask

  task automatic do_sum(input bit sub, input homog_t a, input homog_t b);
    result_t r;
    logic [7:0] st;
    host_op(sub ? OP_SUB : OP_ADD, a, b, r, st);
    check(st == 8'h01, "sum status");
    check(last_alu == 5, $sformatf("sum ALU cycles %0d", last_alu));
    check(mv_eq(result_mv(r), ref_sum(sub, a, b)), "sum value");
  endtask

  // A pair of types the multiplier executes (not bivector x bivector).
  task automatic rand_pair(output homog_t a, output homog_t b);
    int x, y;
    do begin x = $urandom_range(0, 4); y = $urandom_range(0, 4); end
    while (x == 2 && y == 2);
    a = rand_homog(tag_of(x));
    b = rand_homog(tag_of(y));
  endtask

  real q[4], v[3], o3[3];

  task automatic do_rotation();
    homog_t a, b;
    result_t r;
    logic [7:0] st;
    real n, th;
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
    host_op(OP_ROT, a, b, r, st);
    check(st == 8'h01 && r.nparts == 1 && r.p1.tag == TAG_VECTOR, "rotation format");
    check(last_alu == 7, $sformatf("rotation ALU cycles %0d", last_alu));
    for (int k = 0; k < 3; k++) begin
      int d;
      tmp = r.p1.f[k];
      d = tmp - $rtoi(o3[k] * 65536.0);
      check(d < 128 && d > -128, $sformatf("rotation component %0d off by %0d", k, d));
    end
  endtask

  task automatic report(input string name, input longint c0);
    longint c;
    c = cycle - c0;
    $display("workload %-10s %0d operations, %0d clocks, %0.2f clocks per operation (%0.3f us at 50 MHz)",
             name, N_OPS, c, real'(c) / N_OPS, real'(c) / N_OPS / 50.0);
  endtask

  initial begin
    homog_t a, b;
    longint c0;
    int n_lc, n_sum;
    n_lc = 0;
    n_sum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    c0 = cycle;
    for (int i = 0; i < N_OPS; i++) begin rand_pair(a, b); do_product(OP_GP, a, b); end
    report("products", c0);

    c0 = cycle;
    for (int i = 0; i < N_OPS; i++) begin
      a = rand_homog(tag_of($urandom_range(0, 4)));
      b = rand_homog(tag_of($urandom_range(0, 4)));
      do_sum($urandom_range(0, 1) == 1, a, b);
    end
    report("sums", c0);

    c0 = cycle;
    for (int i = 0; i < N_OPS; i++) do_rotation();
    report("rotations", c0);

    c0 = cycle;
    for (int i = 0; i < N_OPS; i++) begin
      if (i % 13 < 2) begin
        a = rand_homog(tag_of($urandom_range(0, 4)));
        b = rand_homog(a.tag);
        do_sum(i % 13 == 1, a, b);
        n_sum++;
      end else begin
        a = rand_homog(TAG_VECTOR);
        b = rand_homog(TAG_BIVECTOR);
        do_product(OP_LCONT, a, b);
        n_lc++;
      end
    end
    report("raytracer", c0);
    $display("raytracer mix: %0d sums/differences, %0d vector-bivector left contractions", n_sum, n_lc);
    check(n_sum > 0 && n_lc > 0, "both raytracer operation kinds ran");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
