// tb_clifford_interface: the interface between four SRAM bank models and a
// model ALU that answers cs after a random delay with a known result. For
// random instruction vectors written to the banks it checks: nothing starts
// before the control byte; the four read transfers use addresses
// INSTR_ADDR..+3; cs rises only after the reads and stays up to w_ack; the
// INSTRUCTION word and both operands reach the ALU intact; the 15-word
// result vector lands at RESULT_ADDR..+3 in the documented layout; the status
// byte reports done or error; and no bank is touched outside those windows.
module tb_clifford_interface;
  import cliffosor_pkg::*;
  import ga_ref_pkg::*;

  localparam int AW = 8;
  localparam int IA = 16, RA = 20;

  logic clk = 0, rst_n = 0, ctrl_valid = 0;
  logic [7:0] ctrl_byte = 0, status_byte;
  logic status_valid;
  logic [3:0][AW-1:0] sram_addr;
  logic [3:0] sram_we, sram_re;
  logic [3:0][31:0] sram_wdata, sram_rdata;
  logic cs, w_ack = 0;
  instr_t instr, result_instr;
  homog_t op_a, op_b;
  result_t result;
  int checks = 0, failures = 0;

  clifford_interface #(.ADDR_W(AW), .INSTR_ADDR(IA), .RESULT_ADDR(RA)) dut (.*);

  for (genvar k = 0; k < 4; k++) begin : g_bank
    sram_bank_model #(.ADDR_W(AW)) u_sram (
      .clk, .addr(sram_addr[k]), .we(sram_we[k]), .re(sram_re[k]),
      .wdata(sram_wdata[k]), .rdata(sram_rdata[k]));
  end

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

  // backdoor access to vector word w of a slot at address base
  function automatic logic [31:0] peek(input int base, input int w);
    case (w % 4)
      0: return g_bank[0].u_sram.mem[base + w / 4];
      1: return g_bank[1].u_sram.mem[base + w / 4];
      2: return g_bank[2].u_sram.mem[base + w / 4];
      default: return g_bank[3].u_sram.mem[base + w / 4];
    endcase
  endfunction
  task automatic poke(input int base, input int w, input logic [31:0] d);
    case (w % 4)
      0: g_bank[0].u_sram.mem[base + w / 4] = d;
      1: g_bank[1].u_sram.mem[base + w / 4] = d;
      2: g_bank[2].u_sram.mem[base + w / 4] = d;
      default: g_bank[3].u_sram.mem[base + w / 4] = d;
    endcase
  endtask

  // model ALU
  int alu_delay = 3, ncs = 0;
  logic cs_seen = 0;
  bit   alu_err;
  always @(posedge clk) begin
    if (cs && !cs_seen) begin
      cs_seen <= 1;
      fork begin
        repeat (alu_delay) @(posedge clk);
        result = '0;
        result.nparts = 2;
        result.error  = alu_err;
        result.p1 = op_a;
        result.p2 = op_b;
        for (int k = 0; k < 6; k++) result.p1.f[k] = op_a.f[k] + 1;
        result_instr = instr;
        w_ack <= 1;
      end join_none
    end
    if (!cs && cs_seen) begin
      cs_seen <= 0;
      w_ack <= 0;
      ncs++;
    end
  end

  // SRAM accesses outside the read/write windows
  int bad_access = 0, nreads = 0, nwrites = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) begin
      if (sram_re[k]) begin
        nreads++;
        if (sram_addr[k] < IA || sram_addr[k] > IA + 3) bad_access++;
      end
      if (sram_we[k]) begin
        nwrites++;
        if (sram_addr[k] < RA || sram_addr[k] > RA + 3) bad_access++;
      end
    end
    if (cs && (|sram_re || |sram_we)) bad_access++;
  end

  initial begin
    result = '0; result_instr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 40; rep++) begin
      logic [31:0] vw [15];
      int cyc;
      homog_t ea, eb;
      for (int w = 0; w < 15; w++) begin vw[w] = $urandom; poke(IA, w, vw[w]); end
      vw[1][2:0] = 3'b010; poke(IA, 1, vw[1]);   // tag of A: bivector
      vw[8][2:0] = 3'b001; poke(IA, 8, vw[8]);   // tag of B: vector
      alu_delay = $urandom_range(1, 9);
      alu_err   = (rep % 5 == 4);
      nreads = 0; nwrites = 0;
      // no activity without the control byte
      repeat (5) @(posedge clk);
      check(!cs && nreads == 0, "idle without control byte");
      @(negedge clk);
      ctrl_valid = 1; ctrl_byte = (rep == 0) ? 8'h07 : 8'h01;  // a wrong byte first
      @(negedge clk);
      ctrl_valid = 0;
      if (rep == 0) begin
        repeat (5) @(posedge clk);
        check(nreads == 0, "wrong control byte ignored");
        @(negedge clk);
        ctrl_valid = 1; ctrl_byte = 8'h01;
        @(negedge clk);
        ctrl_valid = 0;
      end
      cyc = 0;
      while (!cs && cyc < 100) begin @(posedge clk); cyc++; end
      #1;
      check(nreads == 16, $sformatf("four 4-word reads before cs (%0d)", nreads));
      check(instr == vw[0], "instruction word");
      ea.id = vw[1][10:3]; ea.tag = tag_t'(vw[1][2:0]);
      eb.id = vw[8][10:3]; eb.tag = tag_t'(vw[8][2:0]);
      for (int k = 0; k < 6; k++) begin ea.f[k] = vw[2+k]; eb.f[k] = vw[9+k]; end
      check(op_a == ea && op_b == eb, "operands");
      cyc = 0;
      while (!status_valid && cyc < 100) begin @(posedge clk); #1; cyc++; end
      check(status_byte == (alu_err ? 8'h03 : 8'h01), "status byte");
      check(nwrites == 16, "four 4-word writes");
      // result layout
      check(peek(RA, 0) == {21'b0, ea.id, ea.tag}, "TAG1 header");
      for (int k = 0; k < 6; k++) check(peek(RA, 1 + k) == ea.f[k] + 1, "part 1 field");
      check(peek(RA, 7) == {21'b0, eb.id, eb.tag}, "TAG2 header");
      for (int k = 0; k < 6; k++) check(peek(RA, 8 + k) == eb.f[k], "part 2 field");
      check(peek(RA, 14) == {16'h0, vw[0][11:4], vw[0][3:0], 1'b0, alu_err, 2'd2}, "status word");
    end
    check(bad_access == 0, "no stray SRAM access");
    check(ncs == 40, "one cs per operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
