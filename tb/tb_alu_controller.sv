// tb_alu_controller: drives chip select and every opcode (0..15) with model
// functional units that raise their write enable a random number of clocks
// after their chip enable. Checks that the right enable (and only it) rises,
// that load_ab pulses once, that load_result pulses once on the write enable
// and w_ack follows it and holds until cs falls, that unknown opcodes are
// acknowledged with bad_op, and that reset_alu aborts an operation.
module tb_alu_controller;
  import cliffosor_pkg::*;

  logic clk = 0, rst_n = 0, reset_alu = 0, cs = 0;
  opcode_t opcode;
  logic product_we, sum_we, rotation_we;
  logic load_ab, product_ce, sum_ce, rotation_ce, load_result, bad_op, w_ack;
  int checks = 0, failures = 0;
  int delay;

  alu_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model units: write enable `delay` clocks after the enable rises
  int pc = 0, sc = 0, rc = 0;
  always_ff @(posedge clk) begin
    pc <= product_ce  ? pc + 1 : 0;
    sc <= sum_ce      ? sc + 1 : 0;
    rc <= rotation_ce ? rc + 1 : 0;
  end
  assign product_we  = product_ce  && pc >= delay;
  assign sum_we      = sum_ce      && sc >= delay;
  assign rotation_we = rotation_ce && rc >= delay;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic run(input int o, input int d);
    int nload = 0, nres = 0, lat = 0;
    bit is_p, is_s, is_r, legal;
    is_p = (o <= 3); is_s = (o == 4 || o == 5); is_r = (o == 6);
    legal = is_p || is_s || is_r;
    delay = d;
    @(negedge clk);
    opcode = opcode_t'(o);
    cs = 1;
    #1;
    check(load_ab, "load_ab in the cycle cs is first seen");
    do begin
      @(posedge clk); lat++;
      #1;
      if (load_ab) nload++;
      if (load_result) begin
        nres++;
        check(bad_op == !legal, "bad_op only for unknown opcodes");
      end
      if (lat == 1)
        check(product_ce == is_p && sum_ce == is_s && rotation_ce == is_r,
              $sformatf("enable for opcode %0d", o));
    end while (!w_ack && lat < 50);
    check(nload == 0, "load_ab only once");
    check(nres == 1, "load_result once");
    check(lat == (legal ? d + 2 : 2), $sformatf("w_ack latency %0d opcode %0d delay %0d", lat, o, d));
    repeat (3) begin
      @(posedge clk); #1;
      check(w_ack && !load_result, "w_ack held, no second load");
    end
    @(negedge clk);
    cs = 0;
    @(posedge clk); #1;
    check(!w_ack && !product_ce && !sum_ce && !rotation_ce, "idle after cs falls");
  endtask

  initial begin
    opcode = OP_GP;
    delay = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < 16; o++) run(o, 1 + (o % 6));
    for (int k = 0; k < 30; k++) run($urandom_range(0, 7), $urandom_range(1, 8));
    // reset_alu in the middle of an operation
    delay = 20;
    @(negedge clk);
    opcode = OP_GP; cs = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset_alu = 1;
    @(posedge clk); #1;
    check(!product_ce && !w_ack, "reset_alu clears");
    @(negedge clk);
    reset_alu = 0; cs = 0;
    @(posedge clk);
    run(4, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
