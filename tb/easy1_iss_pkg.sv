// easy1_iss_pkg: instruction-level reference model of Easy I for testbenches.
//
// Executes one instruction per step() straight from the ISA table (I = 0
// column; the indirect bit and the two upper opcode bits are ignored, as in
// the hardware). Memory: 512 words, byte address / 2. Also gives the number
// of clock cycles the hardware takes for the instruction (fetch plus its
// execute states) and a small assembler, enc().
package easy1_iss_pkg;

  localparam int WORDS = 512;

  function automatic logic [15:0] enc(logic [2:0] op, int unsigned x);
    return {1'b0, 2'b00, op, 10'(x)};
  endfunction

  class easy1_iss;
    logic [15:0] mem [WORDS];
    logic [15:0] ac;
    logic [9:0]  pc;          // byte address of the next instruction
    // Outcome of the last step.
    logic [2:0]  last_op;
    bit          last_taken;  // BrN taken
    bit          last_wrote;
    logic [9:0]  last_waddr;
    int          last_cycles;

    function new();
      ac = '0; pc = '0;
    endfunction

    function void step();
      logic [15:0] ir;
      logic [9:0]  x;
      ir = mem[pc[9:1]];
      x  = ir[9:0];
      pc = pc + 10'd2;
      last_op = ir[12:10];
      last_taken = 0;
      last_wrote = 0;
      case (ir[12:10])
        3'b000: begin ac = ~ac;                    last_cycles = 2; end
        3'b001: begin ac = {ac[15], ac[15:1]};     last_cycles = 2; end
        3'b010: begin
          if (ac[15]) begin pc = x; last_taken = 1; last_cycles = 3; end
          else last_cycles = 2;
        end
        3'b011: begin pc = x;                      last_cycles = 2; end
        3'b100: begin
          mem[x[9:1]] = ac; last_wrote = 1; last_waddr = x;
          last_cycles = 3;
        end
        3'b101: begin ac = mem[x[9:1]];            last_cycles = 4; end
        3'b110: begin ac = ac & {6'b0, x};         last_cycles = 2; end
        default: begin ac = ac + {6'b0, x};        last_cycles = 2; end
      endcase
    endfunction
  endclass

endpackage
