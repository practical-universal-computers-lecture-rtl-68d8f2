// Shared body of the control unit testbenches: random walk through the
// states, comparing with easy1_cu_ref_pkg::lookup(). Expects clk, rst,
// di_opcode, edb_opcode, ac15, ctrl, state, checks and failures in scope.

  int visits [16];
  int brn_taken = 0, brn_not_taken = 0;

  function automatic logic [17:0] dut_outputs(state_t nxt, ctrl_t c);
    return {nxt, c.alu_op, c.mem_op, c.pc_sel, c.pc_is, c.di_le, c.ac_le,
            c.ao_sel, c.ao_le, c.edb_sel, c.abus_full};
  endfunction

  // Compare the 14 control-point bits of got with the pattern (skips the
  // next-state part, which is checked after the clock edge).
  task automatic compare_ctrl(string pat, logic [17:0] got);
    for (int i = 4; i < 18; i++) begin
      if (pat[i] == "x") continue;
      checks++;
      if ((pat[i] == "1") != got[17-i]) begin
        failures++;
        $display("FAIL state=%b column %0d expected %s got %b", state, i, pat, got);
      end
    end
  endtask

  initial begin
    string pat;
    logic [3:0] exp_next;
    foreach (visits[i]) visits[i] = 0;
    di_opcode = '0; edb_opcode = '0; ac15 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (state != S_RESET1) begin failures++; $display("FAIL not in reset1 after reset"); end
    for (int n = 0; n < 4000; n++) begin
      edb_opcode = opcode_t'($urandom);
      di_opcode  = opcode_t'($urandom);
      ac15       = 1'($urandom);
      #1;
      visits[state]++;
      pat = lookup(state, (state == S_FETCH) ? edb_opcode : di_opcode, ac15);
      checks++;
      if (pat == "") begin
        failures++;
        $display("FAIL unexpected state %b", state);
        break;
      end
      compare_ctrl(pat, dut_outputs(S_RESET1, ctrl));
      for (int i = 0; i < 4; i++) exp_next[3-i] = (pat[i] == "1");
      if (state == S_BRN1) begin
        if (ac15) brn_taken++; else brn_not_taken++;
      end
      @(posedge clk); #1;
      checks++;
      if (state != exp_next) begin
        failures++;
        $display("FAIL next state %b expected %b", state, exp_next);
      end
      // Restart now and then so that the reset states keep being tested.
      if (n % 500 == 499) begin
        rst = 1; @(posedge clk); #1 rst = 0;
      end
    end
    // Every state of the table must have been visited.
    foreach (visits[s]) begin
      if (s == 7 || s > 13) continue;
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %b never visited", 4'(s)); end
    end
    checks++;
    if (brn_taken == 0 || brn_not_taken == 0) begin
      failures++; $display("FAIL brn1 not seen both ways");
    end
    $display("visits: %p", visits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
