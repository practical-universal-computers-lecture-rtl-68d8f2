// easy1_cu_micro: the microprogrammed Easy I control unit.
//
// The state transition table is treated as a program. A 4-bit micro-PC
// (uPC, holding the same state encodings as the hardwired unit) addresses a
// microprogram ROM whose word holds a next-state field, a 2-bit branch field
// and the control points. The branch field drives the mux that picks the
// next uPC, with the codes of the document's microprogram drawing:
//   00  the opcode mapping logic: opcode -> first execute state (fetch)
//   01  the word's own next-state field
//   10  unused in the document; here it also takes the next-state field
//   11  AC:15 selects fetch (0) or brn2 (1) (brn1)
//
// The document's microprogram shows one ALU-op column that is empty ("xx")
// and no words for aopr and sopr, although these two states must set the ALU
// op from the opcode. Here the opcode's lowest bit is a fifth microprogram
// address bit: aopr and sopr have two words each (And/Add, Comp/ShR) and all
// other words are simply repeated. The words are generated from the shared
// state transition table (easy1_pkg::cu_row), so the control points of every
// state match the hardwired unit cycle for cycle.
//
// The opcode mapping reads the opcode bits of the word being fetched
// (edb_opcode), since in fetch DI does not hold it yet; the microprogram
// address bit comes from DI, which holds the instruction in aopr and sopr.
//
// rst (synchronous, active high) sets the uPC to reset1.
module easy1_cu_micro
  import easy1_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_t di_opcode,   // DI<10:14>
  input  opcode_t edb_opcode,  // opcode bits of the word being read
  input  logic    ac15,
  output ctrl_t   ctrl,
  output state_t  state
);

  typedef enum logic [1:0] {
    BR_MAP  = 2'b00,
    BR_NEXT = 2'b01,
    BR_NONE = 2'b10,
    BR_AC15 = 2'b11
  } branch_t;

  typedef struct packed {
    state_t  next;
    branch_t branch;
    ctrl_t   ctrl;
  } uword_t;

  localparam int unsigned UADDR_BITS = 5;
  localparam int unsigned UWORDS     = 2 ** UADDR_BITS;

  typedef logic [$bits(uword_t)-1:0] urom_word_t;

  function automatic urom_word_t uword(int unsigned addr);
    uword_t  w;
    cu_row_t r;
    state_t  s;
    logic [UADDR_BITS-1:0] a;
    a = UADDR_BITS'(addr);
    s = state_t'(a[UADDR_BITS-1:1]);
    r = cu_row(s, {4'b0011, a[0]}, 1'b0);
    w.ctrl = r.ctrl;
    unique case (s)
      S_FETCH: begin w.branch = BR_MAP;  w.next = S_RESET1; end
      S_BRN1:  begin w.branch = BR_AC15; w.next = S_RESET1; end
      default: begin w.branch = BR_NEXT; w.next = r.next;   end
    endcase
    return urom_word_t'(w);
  endfunction

  typedef urom_word_t urom_t [UWORDS];

  function automatic urom_t build_urom();
    urom_t r;
    for (int unsigned i = 0; i < UWORDS; i++) r[i] = uword(i);
    return r;
  endfunction

  // The microprogram: a constant table fixed at elaboration.
  localparam urom_t UROM = build_urom();

  uword_t w;
  state_t mapped, upc_d;

  assign w    = uword_t'(UROM[{state, di_opcode[0]}]);
  assign ctrl = w.ctrl;

  // Opcode mapping: first execute state of each instruction.
  always_comb begin
    unique case (edb_opcode[2:0])
      OP_COMP, OP_SHR: mapped = S_SOPR;
      OP_BRN:          mapped = S_BRN1;
      OP_JUMP:         mapped = S_JUMP;
      OP_STORE:        mapped = S_STORE1;
      OP_LOAD:         mapped = S_LOAD1;
      default:         mapped = S_AOPR;
    endcase
  end

  always_comb begin
    unique case (w.branch)
      BR_MAP:  upc_d = mapped;
      BR_AC15: upc_d = ac15 ? S_BRN2 : S_FETCH;
      default: upc_d = w.next;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET1;
    else     state <= upc_d;
  end

endmodule
