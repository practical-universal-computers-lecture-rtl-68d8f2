// easy1_datapath_tb: self-checking test of the Easy I data paths.
// Random control words and data bus values are applied every cycle; a
// register-level model in the testbench (DI, AC, AO, PC and the A bus)
// predicts the bus outputs before each clock edge and the registers after
// it. Every control point is exercised in both values.
module easy1_datapath_tb;
  import easy1_pkg::*;

  localparam int unsigned AW = 10;
  logic clk = 0, rst = 1;
  ctrl_t ctrl;
  word_t edb_in, edb_out, ac, di;
  logic [AW-1:0] eab, pc;
  opcode_t opcode, edb_opcode;
  logic ac15;
  int checks = 0, failures = 0;

  // Model state.
  word_t m_di, m_ac, m_abus, m_alu;
  logic [AW-1:0] m_ao, m_pc;

  easy1_datapath #(.AW(AW)) dut (
    .clk(clk), .rst(rst), .ctrl(ctrl), .edb_in(edb_in), .edb_out(edb_out), .eab(eab),
    .opcode(opcode), .edb_opcode(edb_opcode), .ac15(ac15), .ac(ac), .pc(pc), .di(di));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (ctrl=%p)", what, got, exp, ctrl);
    end
  endtask

  initial begin
    ctrl = '0; ctrl.pc_sel = 2'b01; edb_in = '0;
    @(posedge clk); #1 rst = 0;
    m_di = '0; m_ac = '0; m_ao = '0; m_pc = '0;
    for (int n = 0; n < 3000; n++) begin
      ctrl.alu_op    = alu_op_t'($urandom_range(0, 4));
      ctrl.mem_op    = mem_op_t'($urandom_range(0, 2));
      ctrl.pc_sel    = 2'($urandom);
      ctrl.pc_is     = 1'($urandom);
      ctrl.di_le     = 1'($urandom);
      ctrl.ac_le     = 1'($urandom);
      ctrl.ao_sel    = 1'($urandom);
      ctrl.ao_le     = 1'($urandom);
      ctrl.edb_sel   = 1'($urandom);
      ctrl.abus_full = 1'($urandom);
      edb_in = 16'($urandom);
      #1;
      // Outputs in this cycle.
      expect_eq("eab", eab, m_ao);
      expect_eq("edb_out", edb_out, ctrl.edb_sel ? m_ac : m_di);
      expect_eq("opcode", opcode, m_di[14:10]);
      expect_eq("edb_opcode", edb_opcode, edb_in[14:10]);
      expect_eq("ac15", ac15, m_ac[15]);
      expect_eq("pc", pc, m_pc);
      // Next register values.
      m_abus = ctrl.abus_full ? m_di : (m_di & 16'h03FF);
      case (ctrl.alu_op)
        ALU_NOTB: m_alu = ~m_ac;
        ALU_AND:  m_alu = m_abus & m_ac;
        ALU_ADD:  m_alu = m_abus + m_ac;
        ALU_SHRB: m_alu = {m_ac[15], m_ac[15:1]};
        default:  m_alu = m_abus;
      endcase
      if (ctrl.ao_le) m_ao = ctrl.ao_sel ? m_abus[AW-1:0] : m_pc;
      case (ctrl.pc_sel)
        2'b00: m_pc = m_abus[AW-1:0];
        2'b01: m_pc = '0;
        2'b10: m_pc = (ctrl.pc_is ? m_pc : m_abus[AW-1:0]) + AW'(2);
        default: ;
      endcase
      if (ctrl.ac_le) m_ac = m_alu;
      if (ctrl.di_le) m_di = edb_in;
      @(posedge clk); #1;
      expect_eq("ac", ac, m_ac);
      expect_eq("di", di, m_di);
      expect_eq("pc after edge", pc, m_pc);
      expect_eq("eab after edge", eab, m_ao);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
