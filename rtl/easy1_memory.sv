// easy1_memory: the memory unit holding both program and data.
//
// Byte addressed, 16-bit words: a word sits at an even byte address and the
// address bit 0 is ignored, so the array has 2**(AW-1) words (512 for the
// 10-bit address of Easy I). The CPU side is the document's memory interface:
// address bus, data word, and a memory op of NOP (00), RD (01) or WR (10).
//
// Timing (this design's choice; the document only says each flowchart box
// takes one cycle): a read is combinational, so the word is on rdata in the
// same cycle as RD and the CPU latches it into DI at the clock edge that ends
// the cycle. A write takes place at the clock edge that ends the WR cycle.
// The bidirectional data bus is split into wdata (CPU to memory) and rdata
// (memory to CPU). rdata always shows the addressed word; the CPU only takes
// it into DI in a cycle where it asked for RD. (Gating rdata by RD would
// close a combinational path from the data bus through the control unit's
// opcode decode back to the memory op.)
// There is no reset: contents are whatever was loaded into mem[].
module easy1_memory
  import easy1_pkg::*;
#(
  parameter int unsigned AW = X_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  mem_op_t       op,
  input  word_t         wdata,
  output word_t         rdata
);

  localparam int unsigned WORDS = 2 ** (AW - 1);

  word_t mem [WORDS];

  wire [AW-2:0] waddr = addr[AW-1:1];

  always_ff @(posedge clk) begin
    if (op == MEM_WR) mem[waddr] <= wdata;
  end

  assign rdata = mem[waddr];

endmodule
