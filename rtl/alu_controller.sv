// alu_controller: controller unit of the Clifford ALU.
//
// Waits for chip select, decodes the opcode and enables one functional unit:
// product_ce for the geometric/outer product and the contractions, sum_ce for
// sum and difference, rotation_ce for the 3D rotation. In the clock that
// samples cs it pulses load_ab so the ALU captures operands A and B and the
// instruction; the enable rises at the same edge. When the enabled unit
// raises its write enable the controller pulses load_result (the result
// register loads at the next edge) and raises w_ack with it. The enable and
// w_ack then stay high until cs falls, which returns the controller to idle.
// An opcode the ALU does not know enables no unit: the result register is
// loaded at once with the error flag set, and w_ack follows one clock after
// cs is sampled.
//
// reset_alu (synchronous, active high) and rst_n both return it to idle.
// The chip-enable/write-enable/w_ack signalling follows the document; the
// state encoding, the opcode classes and the handling of unknown opcodes are
// this design's choices.
module alu_controller
  import cliffosor_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    reset_alu,
  input  logic    cs,
  input  opcode_t opcode,
  input  logic    product_we,
  input  logic    sum_we,
  input  logic    rotation_we,
  output logic    load_ab,
  output logic    product_ce,
  output logic    sum_ce,
  output logic    rotation_ce,
  output logic    load_result,
  output logic    bad_op,       // with load_result: opcode not supported
  output logic    w_ack
);

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_DONE} state_t;
  state_t state;
  logic   illegal;

  assign load_ab = (state == S_IDLE) && cs && !reset_alu;

  always_comb begin
    load_result = 1'b0;
    bad_op      = 1'b0;
    if (state == S_BUSY) begin
      if (product_ce && product_we)       load_result = 1'b1;
      if (sum_ce && sum_we)               load_result = 1'b1;
      if (rotation_ce && rotation_we)     load_result = 1'b1;
      if (illegal) begin
        load_result = 1'b1;
        bad_op      = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || reset_alu) begin
      state       <= S_IDLE;
      product_ce  <= 1'b0;
      sum_ce      <= 1'b0;
      rotation_ce <= 1'b0;
      illegal     <= 1'b0;
      w_ack       <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (cs) begin
          state       <= S_BUSY;
          product_ce  <= (opcode inside {OP_GP, OP_OUTER, OP_LCONT, OP_RCONT});
          sum_ce      <= (opcode inside {OP_ADD, OP_SUB});
          rotation_ce <= (opcode == OP_ROT);
          illegal     <= !(opcode inside {OP_GP, OP_OUTER, OP_LCONT, OP_RCONT,
                                          OP_ADD, OP_SUB, OP_ROT});
        end
        S_BUSY: if (load_result) begin
          state <= S_DONE;
          w_ack <= 1'b1;
        end
        default: if (!cs) begin
          state       <= S_IDLE;
          product_ce  <= 1'b0;
          sum_ce      <= 1'b0;
          rotation_ce <= 1'b0;
          illegal     <= 1'b0;
          w_ack       <= 1'b0;
        end
      endcase
    end
  end

  // Exactly one unit is enabled at a time.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({product_ce, sum_ce, rotation_ce}));

endmodule
