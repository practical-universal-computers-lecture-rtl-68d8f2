// easy1_cu_hardwired_tb: checks the hardwired control unit against the
// reference state table (easy1_cu_ref_pkg).
// After reset the unit is walked through its states with random opcode and
// AC:15 inputs; in every cycle its control points are compared with the
// matching table row (don't cares skipped) and after the edge its state with
// the row's next state. Every reachable state must be visited, and both
// outcomes of brn1.
module easy1_cu_hardwired_tb;
  import easy1_pkg::*;
  import easy1_cu_ref_pkg::*;

  logic    clk = 0, rst = 1;
  opcode_t di_opcode, edb_opcode;
  logic    ac15;
  ctrl_t   ctrl;
  state_t  state;
  int checks = 0, failures = 0;

  easy1_cu_hardwired dut (.clk(clk), .rst(rst), .di_opcode(di_opcode), .edb_opcode(edb_opcode),
                          .ac15(ac15), .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "easy1_cu_check.svh"

endmodule
