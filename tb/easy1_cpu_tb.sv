// easy1_cpu_tb: the Easy I CPU, both control unit variants, against the
// instruction-level reference model (easy1_iss_pkg).
//
// Memory is filled with random words, so the CPU runs a random program of
// all eight instructions, with random jump and branch targets and stores
// into its own code. Random code soon falls into a short loop, so the run is
// cut into episodes: new memory contents, reset, then EPLEN instructions. Each CPU has a memory model here (combinational read,
// write at the clock edge). At every fetch the address on the bus, AC and
// the memory word just written are compared with the model, and the cycles
// the instruction took with the model's count (2 for And/Add/Comp/ShR/Jump,
// 3 for Store and a taken BrN, 4 for Load). Reset must take 2 cycles.
module easy1_cpu_tb;
  import easy1_pkg::*;
  import easy1_iss_pkg::*;

  localparam int EPISODES = 100;
  localparam int EPLEN    = 40;
  localparam int NINSTR   = EPISODES * EPLEN;

  logic clk = 0;
  logic rst [2] = '{1, 1};
  int checks [2] = '{0, 0};
  int failures [2] = '{0, 0};
  bit done [2] = '{0, 0};

  always #5 clk = ~clk;

  initial begin
    repeat (NINSTR * 5 + EPISODES * 10 + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cpu
    logic [9:0] eab, pc;
    mem_op_t    mem_op;
    word_t      edb_out, edb_in, ac, di;
    state_t     state;
    logic [15:0] cmem [512];
    int op_count [8];
    int taken = 0, not_taken = 0;

    easy1_cpu #(.MICROPROGRAMMED(g == 1)) dut (
      .clk(clk), .rst(rst[g]), .eab(eab), .mem_op(mem_op), .edb_out(edb_out), .edb_in(edb_in),
      .state(state), .ac(ac), .pc(pc), .di(di));

    assign edb_in = cmem[eab[9:1]];
    always @(posedge clk) if (mem_op == MEM_WR) cmem[eab[9:1]] <= edb_out;

    task automatic expect_eq(string what, longint got, longint exp);
      checks[g]++;
      if (got != exp) begin
        failures[g]++;
        if (failures[g] < 10) $display("FAIL cpu%0d %s: got %h expected %h", g, what, got, exp);
      end
    endtask

    initial begin
      easy1_iss iss;
      int cyc;
      foreach (op_count[i]) op_count[i] = 0;
      for (int ep = 0; ep < EPISODES; ep++) begin
      iss = new();
      #1 rst[g] = 1;
      foreach (cmem[i]) begin cmem[i] = 16'($urandom); iss.mem[i] = cmem[i]; end
      repeat (2) @(posedge clk);
      #1 rst[g] = 0;
      cyc = 0;
      while (state != S_FETCH && cyc < 10) begin @(posedge clk); #1 cyc++; end
      expect_eq("reset cycles", cyc, 2);
      for (int n = 0; n < EPLEN; n++) begin
        expect_eq("fetch address", eab, iss.pc);
        expect_eq("pc = fetch address + 2", pc, 10'(iss.pc + 2));
        expect_eq("ac", ac, iss.ac);
        iss.step();
        op_count[iss.last_op]++;
        if (iss.last_op == 3'b010) begin
          if (iss.last_taken) taken++; else not_taken++;
        end
        cyc = 0;
        do begin @(posedge clk); #1 cyc++; end while (state != S_FETCH && cyc < 10);
        expect_eq("cycles", cyc, iss.last_cycles);
        if (iss.last_wrote)
          expect_eq("stored word", cmem[iss.last_waddr[9:1]], iss.mem[iss.last_waddr[9:1]]);
      end
      foreach (cmem[i]) expect_eq("final memory", cmem[i], iss.mem[i]);
      end
      foreach (op_count[i]) begin
        checks[g]++;
        if (op_count[i] == 0) begin failures[g]++; $display("FAIL cpu%0d opcode %0d never run", g, i); end
      end
      checks[g]++;
      if (taken == 0 || not_taken == 0) begin failures[g]++; $display("FAIL cpu%0d BrN not seen both ways", g); end
      $display("cpu%0d: opcode counts %p, BrN taken %0d not taken %0d", g, op_count, taken, not_taken);
      done[g] = 1;
    end
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end
endmodule
