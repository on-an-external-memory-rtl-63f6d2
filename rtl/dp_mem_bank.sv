// dp_mem_bank: one dual-port memory bank of the external memory.
//
// Two independent read/write ports, both clocked by the memory clock clk_2x
// (twice the PA clock). Reads are synchronous: rdata shows the word at the
// address registered on the previous rising edge, as in an FPGA block RAM.
// A write stores wdata at addr on the rising edge; rdata of that port then
// shows the old word (read-first). Writing the same address from both ports
// in one cycle is not allowed (the result is port 1's word here).
// The bank size, 512 Kbit as 16384 words of 32 bits, and the use of
// dual-port banks follow the memory scheme; the read latency and write
// behaviour are this design's choices.
module dp_mem_bank
  import ems_pkg::*;
#(
  parameter int unsigned DEPTH = BANK_DEPTH,
  parameter int unsigned W     = WORD_W
) (
  input  logic                     clk_2x,
  // port 0
  input  logic                     we0,
  input  logic [$clog2(DEPTH)-1:0] addr0,
  input  logic [W-1:0]             wdata0,
  output logic [W-1:0]             rdata0,
  // port 1
  input  logic                     we1,
  input  logic [$clog2(DEPTH)-1:0] addr1,
  input  logic [W-1:0]             wdata1,
  output logic [W-1:0]             rdata1
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk_2x) begin
    if (we0) mem[addr0] <= wdata0;
    if (we1) mem[addr1] <= wdata1;
  end

  always_ff @(posedge clk_2x) begin
    rdata0 <= mem[addr0];
    rdata1 <= mem[addr1];
  end

  a_no_collision: assert property (@(posedge clk_2x) !(we0 && we1 && addr0 == addr1));

endmodule
