// cliffosor_top: the CliffoSor geometric-algebra coprocessor core.
//
// The core sits on an FPGA between four 32-bit SRAM banks, which the host
// fills over PCI, and the host's control/status byte ports. Per operation:
// the host writes a 15-word instruction vector (INSTRUCTION word, operand A,
// operand B) into the banks and sends the control byte; the Clifford
// Interface reads the vector in four four-word transfers and raises cs; the
// Clifford ALU executes the operation in its multiplier, adder or rotator
// and raises w_ack; the interface writes the 15-word result vector back in
// four transfers and sends the status byte. The SRAM, the PCI controller and
// the host are outside the core; their signals are the ports here.
//
// Timing: clk is the board clock (50 MHz in the prototype); all logic is
// synchronous to it with an active-low synchronous reset. SRAM read data is
// expected one clock after sram_re. The ALU is reset together with the core
// by rst_n, and on its own by reset_alu (active high, synchronous): the ALU
// control names that input, but the board connection that drives it is not
// given, so it is a port here. Raise it only while no operation is in
// flight, or the interface waits for a w_ack that never comes.
module cliffosor_top
  import cliffosor_pkg::*;
#(
  parameter int unsigned FRAC_BITS   = FRAC_BITS_DEFAULT,
  parameter int unsigned ADDR_W      = 19,
  parameter int unsigned INSTR_ADDR  = 0,
  parameter int unsigned RESULT_ADDR = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ctrl_valid,
  input  logic [7:0]             ctrl_byte,
  output logic                   status_valid,
  output logic [7:0]             status_byte,
  output logic [3:0][ADDR_W-1:0] sram_addr,
  output logic [3:0]             sram_we,
  output logic [3:0]             sram_re,
  output logic [3:0][WORD_W-1:0] sram_wdata,
  input  logic [3:0][WORD_W-1:0] sram_rdata,
  input  logic                   reset_alu
);

  logic    cs, w_ack;
  instr_t  instr, result_instr;
  homog_t  op_a, op_b;
  result_t result;

  clifford_interface #(
    .ADDR_W(ADDR_W), .INSTR_ADDR(INSTR_ADDR), .RESULT_ADDR(RESULT_ADDR)
  ) u_if (
    .clk, .rst_n, .ctrl_valid, .ctrl_byte, .status_valid, .status_byte,
    .sram_addr, .sram_we, .sram_re, .sram_wdata, .sram_rdata,
    .cs, .instr, .op_a, .op_b, .w_ack, .result, .result_instr
  );

  clifford_alu #(.FRAC_BITS(FRAC_BITS)) u_alu (
    .clk, .rst_n, .reset_alu, .cs, .instr, .op_a, .op_b,
    .w_ack, .result, .result_instr
  );

endmodule
