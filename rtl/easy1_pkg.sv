// easy1_pkg: types and constants shared by the Easy I processor.
//
// Easy I is a 16-bit accumulator machine. An instruction is one 16-bit word:
// bit 15 is the indirect bit I, bits 14:10 the opcode and bits 9:0 the
// operand/address field X. Memory is byte addressed and holds 16-bit words,
// so the program counter steps by 2.
//
// The control unit drives the data paths through eleven control points
// (ALU op, PC sel, PC is, DI le, AC le, AO sel, AO le, EDB sel) and the memory
// through a 2-bit control bus (NOP/RD/WR). One more control point, abus_full,
// is this design's own: the document writes "DI<0:9> -> ABUS" for address and
// immediate use and "DI -> ABUS" when a loaded data word goes to the ALU; the
// bit tells the A bus which of the two it carries.
//
// The state encodings, ALU codes and bus codes below are the document's.
// cu_row() is the control unit state transition table in function form; both
// the hardwired ROM and the microprogram are built from it, so the two
// control units cannot drift apart.
package easy1_pkg;

  localparam int unsigned WORD_W = 16;  // data word and instruction width
  localparam int unsigned X_W    = 10;  // X field, DI<0:9>
  localparam int unsigned OP_W   = 5;   // opcode field, DI<10:14>

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [OP_W-1:0]   opcode_t;

  // Control unit states with the document's 4-bit encodings.
  typedef enum logic [3:0] {
    S_RESET1 = 4'b0000,
    S_RESET2 = 4'b0001,
    S_FETCH  = 4'b0010,
    S_AOPR   = 4'b0011,
    S_SOPR   = 4'b0100,
    S_STORE1 = 4'b0101,
    S_STORE2 = 4'b0110,
    S_STORE3 = 4'b0111,
    S_LOAD1  = 4'b1000,
    S_LOAD2  = 4'b1001,
    S_LOAD3  = 4'b1010,
    S_BRN1   = 4'b1011,
    S_BRN2   = 4'b1100,
    S_JUMP   = 4'b1101
  } state_t;

  // ALU operation table.
  typedef enum logic [2:0] {
    ALU_A    = 3'b000,  // A
    ALU_NOTB = 3'b001,  // not B
    ALU_AND  = 3'b010,  // A and B
    ALU_ADD  = 3'b011,  // A + B
    ALU_SHRB = 3'b100   // B / 2
  } alu_op_t;

  // Control bus operation table.
  typedef enum logic [1:0] {
    MEM_NOP = 2'b00,
    MEM_RD  = 2'b01,
    MEM_WR  = 2'b10
  } mem_op_t;

  // PC sel codes, from the inputs of the PC's output mux.
  localparam logic [1:0] PC_ABUS = 2'b00;  // load the A bus
  localparam logic [1:0] PC_ZERO = 2'b01;  // load 0
  localparam logic [1:0] PC_INC  = 2'b10;  // load the +2 adder
  localparam logic [1:0] PC_HOLD = 2'b11;  // keep

  // Opcodes (low three bits; the two upper opcode bits are 00 for all).
  localparam logic [2:0] OP_COMP  = 3'b000;
  localparam logic [2:0] OP_SHR   = 3'b001;
  localparam logic [2:0] OP_BRN   = 3'b010;
  localparam logic [2:0] OP_JUMP  = 3'b011;
  localparam logic [2:0] OP_STORE = 3'b100;
  localparam logic [2:0] OP_LOAD  = 3'b101;
  localparam logic [2:0] OP_AND   = 3'b110;
  localparam logic [2:0] OP_ADD   = 3'b111;

  // The control points of the data paths and the memory control bus.
  typedef struct packed {
    alu_op_t    alu_op;
    mem_op_t    mem_op;
    logic [1:0] pc_sel;
    logic       pc_is;
    logic       di_le;
    logic       ac_le;
    logic       ao_sel;
    logic       ao_le;
    logic       edb_sel;
    logic       abus_full;
  } ctrl_t;

  // One row of the state transition table.
  typedef struct packed {
    state_t next;
    ctrl_t  ctrl;
  } cu_row_t;

  // The state transition table. Don't-care entries (X) are 0, which for the
  // ALU op selects "A": that is what load3 needs to pass DI into AC.
  function automatic cu_row_t cu_row(state_t s, opcode_t opcode, logic ac15);
    cu_row_t r;
    r = '0;
    r.next = S_RESET1;
    r.ctrl.pc_sel = PC_HOLD;
    unique case (s)
      S_RESET1: begin
        r.next = S_RESET2;
        r.ctrl.pc_sel = PC_ZERO;
      end
      S_RESET2: begin
        r.next = S_FETCH;
        r.ctrl.pc_sel = PC_INC; r.ctrl.pc_is = 1'b1;
        r.ctrl.ao_sel = 1'b0;   r.ctrl.ao_le = 1'b1;
      end
      S_FETCH: begin
        r.ctrl.mem_op = MEM_RD;
        r.ctrl.di_le  = 1'b1;
        unique case (opcode[2:0])
          OP_COMP, OP_SHR: r.next = S_SOPR;
          OP_BRN:          r.next = S_BRN1;
          OP_JUMP:         r.next = S_JUMP;
          OP_STORE:        r.next = S_STORE1;
          OP_LOAD:         r.next = S_LOAD1;
          default:         r.next = S_AOPR;  // And, Add
        endcase
      end
      S_AOPR, S_SOPR: begin
        if (s == S_AOPR) r.ctrl.alu_op = opcode[0] ? ALU_ADD  : ALU_AND;
        else             r.ctrl.alu_op = opcode[0] ? ALU_SHRB : ALU_NOTB;
        r.next = S_FETCH;
        r.ctrl.pc_sel = PC_INC; r.ctrl.pc_is = 1'b1;
        r.ctrl.ac_le  = 1'b1;
        r.ctrl.ao_sel = 1'b0;   r.ctrl.ao_le = 1'b1;
      end
      S_STORE1, S_LOAD1: begin
        r.next = (s == S_STORE1) ? S_STORE2 : S_LOAD2;
        r.ctrl.ao_sel = 1'b1; r.ctrl.ao_le = 1'b1;
      end
      S_STORE2: begin
        r.next = S_FETCH;
        r.ctrl.mem_op  = MEM_WR;
        r.ctrl.pc_sel  = PC_INC; r.ctrl.pc_is = 1'b1;
        r.ctrl.ao_sel  = 1'b0;   r.ctrl.ao_le = 1'b1;
        r.ctrl.edb_sel = 1'b1;
      end
      S_LOAD2: begin
        r.next = S_LOAD3;
        r.ctrl.mem_op = MEM_RD;
        r.ctrl.di_le  = 1'b1;
      end
      S_LOAD3: begin
        r.next = S_FETCH;
        r.ctrl.alu_op    = ALU_A;
        r.ctrl.abus_full = 1'b1;
        r.ctrl.pc_sel = PC_INC; r.ctrl.pc_is = 1'b1;
        r.ctrl.ac_le  = 1'b1;
        r.ctrl.ao_sel = 1'b0;   r.ctrl.ao_le = 1'b1;
      end
      S_BRN1: begin
        r.next = ac15 ? S_BRN2 : S_FETCH;
        r.ctrl.pc_sel = PC_INC; r.ctrl.pc_is = 1'b1;
        r.ctrl.ao_sel = 1'b0;   r.ctrl.ao_le = 1'b1;
      end
      S_BRN2, S_JUMP: begin
        r.next = S_FETCH;
        r.ctrl.pc_sel = PC_INC; r.ctrl.pc_is = 1'b0;
        r.ctrl.ao_sel = 1'b1;   r.ctrl.ao_le = 1'b1;
      end
      default: begin
        // store3 and the two unused encodings: restart through reset1.
        r.next = S_RESET1;
      end
    endcase
    return r;
  endfunction

endpackage
