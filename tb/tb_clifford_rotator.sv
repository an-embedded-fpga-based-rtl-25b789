// tb_clifford_rotator: rotates random vectors by random unit rotors (random
// plane and angle) and compares with v' = R v R~ evaluated in real numbers
// through two reference geometric products, from the same quantised
// operands. The fixed-point result must be within 128 LSB (0.002) per
// component: each matrix coefficient carries up to 4 LSB of truncation, times
// components of up to 10, in three terms. A quarter turn in the e1e2
// plane is checked exactly enough to fix the rotation sense, and
// rotation_we must rise in the fifth clock after rotation_ce.
module tb_clifford_rotator;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, we;
  homog_t a, b;
  result_t res;
  int checks = 0, failures = 0;

  clifford_rotator dut (.clk, .rst_n, .ce, .a, .b, .we, .res);

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

  function automatic int srand(input int span);
    int r;
    r = $urandom_range(0, 2 * span);
    return r - span;
  endfunction

  function automatic int tofx(input real r);
    return int'($rtoi(r * 65536.0));
  endfunction

  // operands of the next rotation (module level: passed to the task by name)
  real q[4], v[3];

  task automatic rotate();
    int lat, tmp;
    real o[3];
    homog_t ha, hb;
    ha = '0; hb = '0;
    ha.tag = TAG_VECTOR; hb.tag = TAG_BIVECTOR;
    for (int k = 0; k < 3; k++) ha.f[k] = tofx(v[k]);
    for (int k = 0; k < 4; k++) hb.f[k] = tofx(q[k]);
    // the reference sees the same quantised operands as the design
    for (int k = 0; k < 3; k++) begin tmp = ha.f[k]; v[k] = $itor(tmp) / 65536.0; end
    for (int k = 0; k < 4; k++) begin tmp = hb.f[k]; q[k] = $itor(tmp) / 65536.0; end
    ref_rotate(q, v, o);
    @(negedge clk);
    a = ha; b = hb; ce = 1;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!we && lat < 20);
    check(lat == 5, $sformatf("latency %0d", lat));
    check(res.nparts == 1 && res.p1.tag == TAG_VECTOR && res.p1.f[3] == 0, "result format");
    for (int k = 0; k < 3; k++) begin
      int d;
      d = int'(res.p1.f[k]) - tofx(o[k]);
      check(d < 128 && d > -128, $sformatf("component %0d got %0d want %0d", k, int'(res.p1.f[k]), tofx(o[k])));
    end
    @(negedge clk);
    ce = 0;
    @(negedge clk);
  endtask

  initial begin
    real n, th;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // quarter turn: R = cos(pi/4) - sin(pi/4) e12 takes e1 to e2
    q = '{0.70710678, -0.70710678, 0.0, 0.0};
    v = '{1.0, 0.0, 0.0};
    rotate();
    check(res.p1.f[1] > 32'sd65400 && res.p1.f[1] < 32'sd65600, "e1 -> e2");
    for (int rep = 0; rep < 200; rep++) begin
      th = ($urandom_range(0, 62831) / 10000.0);
      for (int k = 1; k < 4; k++) q[k] = srand(1000) / 1000.0;
      n = $sqrt(q[1]*q[1] + q[2]*q[2] + q[3]*q[3]) + 1e-9;
      q[0] = $cos(th / 2.0);
      for (int k = 1; k < 4; k++) q[k] = q[k] / n * $sin(th / 2.0);
      for (int k = 0; k < 3; k++) v[k] = srand(10000) / 1000.0;
      rotate();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
