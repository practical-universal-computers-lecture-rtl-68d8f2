// easy1_top_tb: end-to-end test of easy1_top at its default parameters.
//
// Both Easy I machines (hardwired and microprogrammed control) are loaded
// with the same program, with different loop counts (N_HW, N_MP) so that the
// two machines do not run in lockstep: multiply by repeated addition,
// P = 7 * N, using a
// decrement built from Comp and Add (~(~c + 1) = c - 1) and a BrN loop,
// then R = P / 2 (ShR) and M = R and 0xF0 (And), then a Jump to itself.
// The program and its data are written into the memories while rst is held.
// Expected: the final memory words, the final AC and the cycle count up to
// the halt loop (and one turn of it), taken from the reference model (easy1_iss_pkg), and the
// closed-form values P = 7N, R = P/2, M = R & 0xF0.
// Mechanisms counted on both machines: every control state, BrN taken and
// not taken, memory writes, the reset sequence. The ROM full adder is
// checked exhaustively alongside.
module easy1_top_tb;
  import easy1_pkg::*;
  import easy1_iss_pkg::*;

  localparam int N_HW   = 10;      // loop count, hardwired machine
  localparam int N_MP   = 6;       // loop count, microprogrammed machine
  localparam int K      = 7;       // added per iteration
  localparam int P_ADDR = 'h200, CNT_ADDR = 'h202, R_ADDR = 'h204, M_ADDR = 'h206;
  localparam int HALT   = 'h1E;

  logic clk = 0, rst = 1;
  logic [9:0] hw_eab, mp_eab, hw_pc, mp_pc;
  mem_op_t hw_mem_op, mp_mem_op;
  word_t hw_edb_out, hw_edb_in, hw_ac, hw_di, mp_edb_out, mp_edb_in, mp_ac, mp_di;
  state_t hw_state, mp_state;
  logic fa_a, fa_b, fa_cin, fa_s, fa_cout;
  int checks = 0, failures = 0;

  easy1_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [15:0] prog [16];
  initial begin
    prog[0]  = enc(OP_LOAD,  P_ADDR);
    prog[1]  = enc(OP_ADD,   K);
    prog[2]  = enc(OP_STORE, P_ADDR);
    prog[3]  = enc(OP_LOAD,  CNT_ADDR);
    prog[4]  = enc(OP_COMP,  0);
    prog[5]  = enc(OP_ADD,   1);
    prog[6]  = enc(OP_COMP,  0);
    prog[7]  = enc(OP_STORE, CNT_ADDR);
    prog[8]  = enc(OP_COMP,  0);
    prog[9]  = enc(OP_BRN,   'h00);
    prog[10] = enc(OP_LOAD,  P_ADDR);
    prog[11] = enc(OP_SHR,   0);
    prog[12] = enc(OP_STORE, R_ADDR);
    prog[13] = enc(OP_AND,   'h0F0);
    prog[14] = enc(OP_STORE, M_ADDR);
    prog[15] = enc(OP_JUMP,  HALT);
  end

  // Mechanism counters, per machine.
  int hw_visits [16], mp_visits [16];
  int hw_taken = 0, hw_not_taken = 0, mp_taken = 0, mp_not_taken = 0;
  int hw_writes = 0, mp_writes = 0;
  bit counting = 0;
  always @(posedge clk) if (counting) begin
    hw_visits[hw_state]++;
    mp_visits[mp_state]++;
    if (hw_state == S_BRN1) begin if (hw_ac[15]) hw_taken++; else hw_not_taken++; end
    if (mp_state == S_BRN1) begin if (mp_ac[15]) mp_taken++; else mp_not_taken++; end
    if (hw_mem_op == MEM_WR) hw_writes++;
    if (mp_mem_op == MEM_WR) mp_writes++;
  end

  initial begin
    easy1_iss iss = new(), iss_mp = new();
    int exp_cycles, exp_cycles_mp, hw_cycles, mp_cycles, cyc;
    bit hw_done, mp_done;
    fa_a = 0; fa_b = 0; fa_cin = 0;
    foreach (hw_visits[i]) begin hw_visits[i] = 0; mp_visits[i] = 0; end

    // Load program and data into both memories and the model.
    #1;
    for (int i = 0; i < 512; i++) begin
      logic [15:0] w;
      w = (i < 16) ? prog[i] : 16'h0000;
      if (i == CNT_ADDR / 2) w = 16'(N_HW - 1);
      dut.u_hw_mem.mem[i] = w;
      iss.mem[i] = w;
      if (i == CNT_ADDR / 2) w = 16'(N_MP - 1);
      dut.u_mp_mem.mem[i] = w;
      iss_mp.mem[i] = w;
    end

    // Reference run up to the first fetch of the halt loop.
    exp_cycles = 2;
    while (iss.pc != HALT) begin iss.step(); exp_cycles += iss.last_cycles; end
    exp_cycles_mp = 2;
    while (iss_mp.pc != HALT) begin iss_mp.step(); exp_cycles_mp += iss_mp.last_cycles; end

    repeat (2) @(posedge clk);
    #1 rst = 0; counting = 1;
    cyc = 0; hw_done = 0; mp_done = 0;
    while (!(hw_done && mp_done) && cyc < 4000) begin
      @(posedge clk); #1 cyc++;
      if (!hw_done && hw_state == S_FETCH && hw_eab == HALT) begin hw_done = 1; hw_cycles = cyc; end
      if (!mp_done && mp_state == S_FETCH && mp_eab == HALT) begin mp_done = 1; mp_cycles = cyc; end
    end
    // The machine with the longer run (hardwired) reaches the halt fetch
    // last; one more Jump (2 cycles) must bring both back to it.
    repeat (2) @(posedge clk);
    #1 counting = 0;
    expect_eq("hw halt loop state", hw_state, S_FETCH);
    expect_eq("hw halt loop address", hw_eab, HALT);
    expect_eq("mp halt loop state", mp_state, S_FETCH);
    expect_eq("mp halt loop address", mp_eab, HALT);
    expect_eq("hardwired reached halt", hw_done, 1);
    expect_eq("microprogrammed reached halt", mp_done, 1);
    expect_eq("hardwired cycles", hw_cycles, exp_cycles);
    expect_eq("microprogrammed cycles", mp_cycles, exp_cycles_mp);
    $display("program: hardwired %0d cycles (model %0d), microprogrammed %0d cycles (model %0d)",
             hw_cycles, exp_cycles, mp_cycles, exp_cycles_mp);

    // Results.
    expect_eq("model P", iss.mem[P_ADDR/2], K * N_HW);
    expect_eq("hw P", dut.u_hw_mem.mem[P_ADDR/2], K * N_HW);
    expect_eq("mp P", dut.u_mp_mem.mem[P_ADDR/2], K * N_MP);
    expect_eq("hw R", dut.u_hw_mem.mem[R_ADDR/2], (K * N_HW) / 2);
    expect_eq("mp R", dut.u_mp_mem.mem[R_ADDR/2], (K * N_MP) / 2);
    expect_eq("hw M", dut.u_hw_mem.mem[M_ADDR/2], ((K * N_HW) / 2) & 'hF0);
    expect_eq("mp M", dut.u_mp_mem.mem[M_ADDR/2], ((K * N_MP) / 2) & 'hF0);
    expect_eq("hw counter", dut.u_hw_mem.mem[CNT_ADDR/2], 16'hFFFF);
    expect_eq("mp counter", dut.u_mp_mem.mem[CNT_ADDR/2], 16'hFFFF);
    expect_eq("hw AC", hw_ac, iss.ac);
    expect_eq("mp AC", mp_ac, iss_mp.ac);
    for (int i = 0; i < 512; i++) begin
      expect_eq("hw memory", dut.u_hw_mem.mem[i], iss.mem[i]);
      expect_eq("mp memory", dut.u_mp_mem.mem[i], iss_mp.mem[i]);
    end

    // Mechanisms.
    for (int s = 0; s < 14; s++) begin
      if (s == 7) continue;  // store3 is not used
      checks += 2;
      if (hw_visits[s] == 0) begin failures++; $display("FAIL hw state %0d never entered", s); end
      if (mp_visits[s] == 0) begin failures++; $display("FAIL mp state %0d never entered", s); end
    end
    checks += 6;
    if (hw_taken != N_HW - 1 || mp_taken != N_MP - 1) begin failures++; $display("FAIL BrN taken count"); end
    if (hw_not_taken != 1 || mp_not_taken != 1) begin failures++; $display("FAIL BrN not-taken count"); end
    if (hw_writes != 2 * N_HW + 2 || mp_writes != 2 * N_MP + 2) begin failures++; $display("FAIL write count"); end
    if (hw_visits[S_RESET1] != 1 || hw_visits[S_RESET2] != 1) begin failures++; $display("FAIL reset sequence"); end
    if (mp_visits[S_RESET1] != 1 || mp_visits[S_RESET2] != 1) begin failures++; $display("FAIL reset sequence"); end
    if (hw_visits[S_STORE3] != 0) begin failures++; $display("FAIL store3 entered"); end
    $display("BrN taken %0d / not taken %0d, memory writes %0d, state visits %p",
             hw_taken, hw_not_taken, hw_writes, hw_visits);

    // ROM full adder.
    for (int i = 0; i < 8; i++) begin
      {fa_a, fa_b, fa_cin} = 3'(i);
      #1;
      expect_eq("fa_rom", {fa_cout, fa_s}, int'(fa_a) + int'(fa_b) + int'(fa_cin));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
