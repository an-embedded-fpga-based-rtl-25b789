// sram_bank_model: behavioural model of one 32-bit board SRAM bank for the
// testbenches (the real part is an SRAM chip on the board). Synchronous:
// a write with `we` stores `wdata` at `addr` on the clock edge; a read with
// `re` returns the word at `addr` on `rdata` after the edge. The array is
// cleared at time zero and is reached by testbenches through `mem`.
module sram_bank_model #(
  parameter int unsigned ADDR_W = 19
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              re,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata
);
  logic [31:0] mem [2**ADDR_W];

  initial begin
    foreach (mem[i]) mem[i] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

  // the core never reads and writes a bank in the same clock
  always @(posedge clk) assert (!(we && re));
endmodule
