// easy1_cu_hardwired: the hardwired Easy I control unit, a ROM-based FSM.
//
// As in the document's hardwired approach, the state register (4 bits) and
// the two status inputs, AC:15 and the opcode DI<10:14>, form a 10-bit ROM
// address; the ROM word gives the next state and the control points. One ROM
// word per clock is one flowchart box (one CPU cycle).
//
// ROM address = {state[3:0], ac15, opcode[4:0]}; the bit order is this
// design's choice. Word = {next state (4), control points (14)}: the ALU op
// (3), memory op (2), PC sel (2), PC is, DI le, AC le, AO sel, AO le,
// EDB sel, and this design's abus_full. The contents are computed from the
// state transition table in easy1_pkg::cu_row(); states that ignore the
// status inputs repeat one word over 64 addresses, as the document notes.
//
// In fetch the instruction is still on its way into DI, so the opcode the
// ROM sees is taken from the data bus in that state (as a transparent DI
// latch would pass it) and from DI in all others; the mux is driven by a
// decode of the state register, not by the ROM, so it adds no loop.
//
// rst (synchronous, active high) puts the FSM in reset1; from there reset1
// and reset2 clear the PC and point AO at address 0, then fetch begins.
module easy1_cu_hardwired
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

  localparam int unsigned ADDR_BITS = 4 + 1 + OP_W;   // 10
  localparam int unsigned ROM_WORDS = 2 ** ADDR_BITS; // 1024

  typedef logic [$bits(cu_row_t)-1:0] rom_word_t;

  function automatic rom_word_t rom_entry(int unsigned addr);
    logic [ADDR_BITS-1:0] a;
    a = ADDR_BITS'(addr);
    return rom_word_t'(cu_row(state_t'(a[ADDR_BITS-1 -: 4]),
                              opcode_t'(a[OP_W-1:0]),
                              a[OP_W]));
  endfunction

  typedef rom_word_t rom_t [ROM_WORDS];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned i = 0; i < ROM_WORDS; i++) r[i] = rom_entry(i);
    return r;
  endfunction

  // The ROM: a constant table fixed at elaboration.
  localparam rom_t ROM = build_rom();

  logic [ADDR_BITS-1:0] rom_addr;
  cu_row_t              word;
  opcode_t              opcode;

  assign opcode   = (state == S_FETCH) ? edb_opcode : di_opcode;

  assign rom_addr = {state, ac15, opcode};
  assign word     = cu_row_t'(ROM[rom_addr]);
  assign ctrl     = word.ctrl;

  always_ff @(posedge clk) begin
    if (rst) state <= S_RESET1;
    else     state <= word.next;
  end

endmodule
