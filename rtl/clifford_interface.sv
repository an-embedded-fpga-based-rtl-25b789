// clifford_interface: Clifford Interface unit of the CliffoSor coprocessor.
//
// Moves one instruction from the board SRAM to the Clifford ALU and its
// result back. The four SRAM banks are read or written together, one 32-bit
// word per bank per access, so a 16-word slot takes four transfers:
//
//   idle    wait for the host's control byte CTRL_START (the host has written
//           the instruction vector to SRAM)
//   read    four transfers from word address INSTR_ADDR+t (t = 0..3) of every
//           bank; bank k supplies vector word 4t+k. Word 0 is the
//           INSTRUCTION, words 1-7 operand A (HEADER + fields A..F), words
//           8-14 operand B; word 15 is ignored.
//   exec    cs high to the ALU until w_ack
//   write   four transfers of the result vector to RESULT_ADDR+t: word 0
//           TAG1 header, 1-6 fields A1..F1, 7 TAG2 header, 8-13 fields
//           A2..F2, 14 status word, 15 zero
//   status  one-clock status_valid with STATUS_DONE (STATUS_ERROR when the
//           ALU flagged the operation as not executed)
//
// A header word has the operand/result ID in bits 10:3 and the tag in bits
// 2:0. The status word holds nparts in bits 1:0, the error flag in bit 2, the
// opcode in bits 7:4 and the result ID in bits 15:8. Read data is expected
// one clock after sram_re (synchronous SRAM).
//
// The four-transfer reads and writes, the control/status byte exchange and
// the start conditions follow the document. The byte values, the address
// layout, the status word and the single-strobe byte handshake (in place of
// the board vendor's proprietary protocol) are this design's choices.
//
// Lint reports unused bits that are unused on purpose: the operand IDs and
// spare bits of result_instr (only the result ID and opcode go into the
// status word), the unused high bits of a header, and the coefficient
// fields of an element whose header is being packed.
module clifford_interface
  import cliffosor_pkg::*;
#(
  parameter int unsigned ADDR_W      = 19,
  parameter int unsigned INSTR_ADDR  = 0,
  parameter int unsigned RESULT_ADDR = 4,
  parameter logic [7:0]  CTRL_START  = 8'h01,
  parameter logic [7:0]  STATUS_DONE = 8'h01,
  parameter logic [7:0]  STATUS_ERROR = 8'h03
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host control/status bytes
  input  logic                        ctrl_valid,
  input  logic [7:0]                  ctrl_byte,
  output logic                        status_valid,
  output logic [7:0]                  status_byte,
  // SRAM banks
  output logic [3:0][ADDR_W-1:0]      sram_addr,
  output logic [3:0]                  sram_we,
  output logic [3:0]                  sram_re,
  output logic [3:0][WORD_W-1:0]      sram_wdata,
  input  logic [3:0][WORD_W-1:0]      sram_rdata,
  // Clifford ALU
  output logic                        cs,
  output instr_t                      instr,
  output homog_t                      op_a,
  output homog_t                      op_b,
  input  logic                        w_ack,
  input  result_t                     result,
  input  instr_t                      result_instr
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_EXEC, S_WRITE, S_STATUS} state_t;
  state_t state;

  logic [2:0]                    t;        // transfer counter
  logic                          rd_pend;  // read data arrives this cycle
  logic [1:0]                    rd_idx;
  logic [15:0][WORD_W-1:0]       vec;      // instruction or result vector
  logic                          err_q;

  function automatic homog_t unpack_operand(input logic [15:0][WORD_W-1:0] v,
                                            input int unsigned base);
    homog_t  h;
    header_t hd;
    hd    = header_t'(v[base]);
    h.id  = hd.id;
    h.tag = tag_t'(hd.tag);
    for (int k = 0; k < 6; k++) h.f[k] = v[base+1+k];
    return h;
  endfunction

  function automatic logic [WORD_W-1:0] pack_header(input homog_t h);
    header_t hd;
    hd        = '0;
    hd.id     = h.id;
    hd.tag    = h.tag;
    return hd;
  endfunction

  assign instr = instr_t'(vec[0]);
  assign op_a  = unpack_operand(vec, 1);
  assign op_b  = unpack_operand(vec, 8);
  assign cs    = (state == S_EXEC);

  always_comb begin
    sram_re    = '0;
    sram_we    = '0;
    sram_addr  = '0;
    sram_wdata = '0;
    for (int k = 0; k < 4; k++) begin
      if (state == S_READ && t < 3'd4) begin
        sram_re[k]   = 1'b1;
        sram_addr[k] = ADDR_W'(INSTR_ADDR) + ADDR_W'(t);
      end
      if (state == S_WRITE) begin
        sram_we[k]    = 1'b1;
        sram_addr[k]  = ADDR_W'(RESULT_ADDR) + ADDR_W'(t);
        sram_wdata[k] = vec[4*t[1:0]+k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      t            <= '0;
      rd_pend      <= 1'b0;
      rd_idx       <= '0;
      vec          <= '0;
      err_q        <= 1'b0;
      status_valid <= 1'b0;
      status_byte  <= '0;
    end else begin
      status_valid <= 1'b0;
      rd_pend      <= 1'b0;
      if (rd_pend)
        for (int k = 0; k < 4; k++) vec[4*rd_idx+k] <= sram_rdata[k];
      case (state)
        S_IDLE: if (ctrl_valid && ctrl_byte == CTRL_START) begin
          state <= S_READ;
          t     <= '0;
        end
        S_READ: begin
          if (t < 3'd4) begin
            rd_pend <= 1'b1;
            rd_idx  <= t[1:0];
            t       <= t + 3'd1;
          end else if (!rd_pend) begin
            state <= S_EXEC;
          end
        end
        S_EXEC: if (w_ack) begin
          vec[0]  <= pack_header(result.p1);
          for (int k = 0; k < 6; k++) vec[1+k] <= result.p1.f[k];
          vec[7]  <= pack_header(result.p2);
          for (int k = 0; k < 6; k++) vec[8+k] <= result.p2.f[k];
          vec[14] <= {16'h0, result_instr.id_r, result_instr.opcode,
                      1'b0, result.error, result.nparts};
          vec[15] <= '0;
          err_q   <= result.error;
          state   <= S_WRITE;
          t       <= '0;
        end
        S_WRITE: begin
          if (t == 3'd3) state <= S_STATUS;
          t <= t + 3'd1;
        end
        default: begin
          status_valid <= 1'b1;
          status_byte  <= err_q ? STATUS_ERROR : STATUS_DONE;
          state        <= S_IDLE;
        end
      endcase
    end
  end

  // cs is only dropped after the ALU acknowledged.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cs && !w_ack) |=> cs);

endmodule
