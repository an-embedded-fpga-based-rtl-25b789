// clifford_alu: the Clifford ALU of the CliffoSor coprocessor.
//
// Holds Register A, Register B, the ALU controller, the three functional
// units (multiplier, adder, rotator) and the result register. When the
// interface raises cs, the controller captures the INSTRUCTION word and both
// operand buses in one clock and enables the unit the opcode selects; the
// unit's result is loaded into the result register and w_ack is raised. cs
// must stay high, with the operand buses unchanged, until w_ack; dropping cs
// returns the ALU to idle. Each result part carries the RESULT ID of the
// instruction. Latency from the clock edge that samples cs to the edge that
// raises w_ack: 7 clocks for products, 5 for sums and differences, 7 for
// rotations, 2 for an unknown opcode (error flag set, no parts).
//
// The register/unit/controller structure and the three latencies follow the
// document; result-ID handling and the error flag are this design's choices.
module clifford_alu
  import cliffosor_pkg::*;
#(
  parameter int unsigned FRAC_BITS = FRAC_BITS_DEFAULT
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     reset_alu,
  input  logic     cs,
  input  instr_t   instr,
  input  homog_t   op_a,
  input  homog_t   op_b,
  output logic     w_ack,
  output result_t  result,
  output instr_t   result_instr   // instruction the result belongs to
);

  instr_t  instr_q;
  homog_t  reg_a, reg_b;
  logic    load_ab, load_result, bad_op;
  logic    product_ce, sum_ce, rotation_ce;
  logic    product_we, sum_we, rotation_we;
  result_t mul_res, add_res, rot_res;

  alu_controller u_ctrl (
    .clk, .rst_n, .reset_alu, .cs,
    .opcode      (opcode_t'(instr.opcode)),
    .product_we, .sum_we, .rotation_we,
    .load_ab, .product_ce, .sum_ce, .rotation_ce,
    .load_result, .bad_op, .w_ack
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      instr_q <= '0;
      reg_a   <= '0;
      reg_b   <= '0;
    end else if (load_ab) begin
      instr_q <= instr;
      reg_a   <= op_a;
      reg_b   <= op_b;
    end
  end

  clifford_multiplier #(.FRAC_BITS(FRAC_BITS)) u_mul (
    .clk, .rst_n, .ce(product_ce), .op(opcode_t'(instr_q.opcode)),
    .a(reg_a), .b(reg_b), .we(product_we), .res(mul_res)
  );

  clifford_adder u_add (
    .clk, .rst_n, .ce(sum_ce), .sub(instr_q.opcode == OP_SUB),
    .a(reg_a), .b(reg_b), .we(sum_we), .res(add_res)
  );

  clifford_rotator #(.FRAC_BITS(FRAC_BITS)) u_rot (
    .clk, .rst_n, .ce(rotation_ce),
    .a(reg_a), .b(reg_b), .we(rotation_we), .res(rot_res)
  );

  // result register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      result <= '0;
    end else if (load_result) begin
      result_t r;
      if (bad_op) begin
        r       = '0;
        r.error = 1'b1;
      end else if (product_ce) r = mul_res;
      else if (sum_ce)         r = add_res;
      else                     r = rot_res;
      r.p1.id = instr_q.id_r;
      r.p2.id = instr_q.id_r;
      result <= r;
    end
  end

  assign result_instr = instr_q;

endmodule
