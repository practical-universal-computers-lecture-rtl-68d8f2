// easy1_cpu: the Easy I processor, data paths plus control unit.
//
// The control unit reads the state of the data paths through two status
// signals, the opcode DI<10:14> and the accumulator sign AC:15, and drives
// the data paths through the control points and the memory through the
// control bus (mem_op). MICROPROGRAMMED selects which of the document's two
// control unit designs is built: 0 the hardwired ROM FSM, 1 the
// microprogrammed unit. Both run every instruction in the same cycles:
//   reset: 2 cycles (reset1, reset2), then per instruction
//   And, Add, Comp, ShR, Jump: 2    Store: 3    Load: 4
//   BrN: 2 if AC >= 0, 3 if AC < 0 (the branch is first assumed not taken)
//
// Invariant between instructions: at the start of fetch, AO holds the address
// of the instruction to fetch and the PC points to the next one.
//
// The indirect bit (bit 15) is ignored, as in the document's control unit,
// which is designed for I = 0 only; so are the two upper opcode bits.
//
// Memory interface: eab (byte address), mem_op, edb_out (word to write),
// edb_in (word read, valid in the same cycle as RD).
//
// Assertions (simulation): the control bus never carries the undefined code
// 11, the unused state codes are never entered, and the fetch invariant
// holds at every fetch (PC = AO + 2).
module easy1_cpu
  import easy1_pkg::*;
#(
  parameter bit          MICROPROGRAMMED = 1'b0,
  parameter int unsigned AW              = X_W
) (
  input  logic          clk,
  input  logic          rst,
  output logic [AW-1:0] eab,
  output mem_op_t       mem_op,
  output word_t         edb_out,
  input  word_t         edb_in,
  output state_t        state,
  output word_t         ac,
  output logic [AW-1:0] pc,
  output word_t         di
);

  ctrl_t   ctrl;
  opcode_t di_opcode, edb_opcode;
  logic    ac15;

  easy1_datapath #(.AW(AW)) u_dp (
    .clk     (clk),
    .rst     (rst),
    .ctrl    (ctrl),
    .edb_in  (edb_in),
    .edb_out (edb_out),
    .eab     (eab),
    .opcode     (di_opcode),
    .edb_opcode (edb_opcode),
    .ac15    (ac15),
    .ac      (ac),
    .pc      (pc),
    .di      (di)
  );

  if (MICROPROGRAMMED) begin : g_micro
    easy1_cu_micro u_cu (
      .clk    (clk),
      .rst    (rst),
      .di_opcode  (di_opcode),
      .edb_opcode (edb_opcode),
      .ac15   (ac15),
      .ctrl   (ctrl),
      .state  (state)
    );
  end else begin : g_hardwired
    easy1_cu_hardwired u_cu (
      .clk    (clk),
      .rst    (rst),
      .di_opcode  (di_opcode),
      .edb_opcode (edb_opcode),
      .ac15   (ac15),
      .ctrl   (ctrl),
      .state  (state)
    );
  end

  assign mem_op = ctrl.mem_op;

  a_mem_op_defined: assert property (@(posedge clk) disable iff (rst)
    mem_op inside {MEM_NOP, MEM_RD, MEM_WR});

  a_state_used: assert property (@(posedge clk) disable iff (rst)
    !(state inside {S_STORE3, 4'b1110, 4'b1111}));

  a_fetch_invariant: assert property (@(posedge clk) disable iff (rst)
    (state == S_FETCH) |-> (pc == AW'(eab + AW'(2))));

endmodule
