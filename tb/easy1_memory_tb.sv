// easy1_memory_tb: self-checking test of the Easy I memory unit.
// Writes random words at random even addresses with WR, then reads them back
// with RD (combinational read) and compares with a reference array. Checks
// that NOP and RD do not write and that address bit 0 is ignored.
module easy1_memory_tb;
  import easy1_pkg::*;

  localparam int unsigned AW = 10;
  logic clk = 0;
  logic [AW-1:0] addr;
  mem_op_t op;
  word_t wdata, rdata;
  word_t ref_mem [512];
  int checks = 0, failures = 0;

  easy1_memory #(.AW(AW)) dut (.clk(clk), .addr(addr), .op(op), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = MEM_NOP; addr = '0; wdata = '0;
    // Fill every word.
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      op = MEM_WR; addr = AW'(2 * i); wdata = 16'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); op = MEM_NOP;
    // Random reads, writes and no-ops.
    for (int n = 0; n < 3000; n++) begin
      int w;
      @(negedge clk);
      w = $urandom_range(0, 511);
      addr = AW'(2 * w) | AW'($urandom_range(0, 1));  // odd addresses too
      wdata = 16'($urandom);
      case ($urandom_range(0, 2))
        0: op = MEM_NOP;
        1: op = MEM_RD;
        default: op = MEM_WR;
      endcase
      #1;
      if (op == MEM_RD) begin
        checks++;
        if (rdata !== ref_mem[w]) begin
          failures++;
          $display("FAIL read addr=%h got %h expected %h", addr, rdata, ref_mem[w]);
        end
      end
      if (op == MEM_WR) ref_mem[w] = wdata;
    end
    // Final full read-back.
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); op = MEM_RD; addr = AW'(2 * i); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL final addr=%h got %h expected %h", addr, rdata, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
