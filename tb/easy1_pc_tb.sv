// easy1_pc_tb: self-checking test of the Easy I program counter.
// A reference PC is kept in the testbench; each cycle random pcsel/pcis and
// A bus values are applied and the register is compared after the edge:
// 00 load A bus, 01 load 0, 10 load (pcis ? PC : A bus) + 2, 11 hold.
module easy1_pc_tb;
  import easy1_pkg::*;

  localparam int unsigned AW = 10;
  logic clk = 0;
  logic [AW-1:0] abus, pc, ref_pc;
  logic [1:0] pc_sel;
  logic pc_is;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  easy1_pc #(.AW(AW)) dut (.clk(clk), .abus(abus), .pc_sel(pc_sel), .pc_is(pc_is), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Start from zero.
    pc_sel = 2'b01; pc_is = 0; abus = '0;
    @(posedge clk); #1;
    ref_pc = '0;
    checks++; if (pc !== '0) begin failures++; $display("FAIL clear"); end
    for (int i = 0; i < 2000; i++) begin
      pc_sel = 2'($urandom); pc_is = 1'($urandom); abus = AW'($urandom);
      #1;
      case (pc_sel)
        2'b00: ref_pc = abus;
        2'b01: ref_pc = 0;
        2'b10: ref_pc = pc_is ? AW'(ref_pc + 2) : AW'(abus + 2);
        default: ;
      endcase
      seen[pc_sel]++;
      @(posedge clk); #1;
      checks++;
      if (pc !== ref_pc) begin
        failures++;
        $display("FAIL sel=%b is=%b abus=%h pc=%h expected %h", pc_sel, pc_is, abus, pc, ref_pc);
      end
    end
    // Wrap-around of the +2 adder.
    pc_sel = 2'b00; abus = 10'h3FE; @(posedge clk); #1;
    pc_sel = 2'b10; pc_is = 1; @(posedge clk); #1;
    checks++; if (pc !== '0) begin failures++; $display("FAIL wrap"); end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL pcsel %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
