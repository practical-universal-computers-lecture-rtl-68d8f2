// easy1_pc: the Easy I program counter, able to load and increment at once.
//
// Structure as in the document's PC drawing: a 2-input mux (control "pcis")
// picks the A bus (0) or the PC itself (1) as the input of a +2 adder; a
// 4-input mux (control "pcsel") picks what the PC register loads at the next
// clock edge: 00 the A bus, 01 zero, 10 the adder output, 11 the PC (hold).
// So "PC + 2 -> PC" is pcsel=10, pcis=1, and "DI<0:9> + 2 -> PC" in a single
// cycle (jump, taken branch) is pcsel=10, pcis=0.
//
// The PC is AW bits wide, the width of a byte address (10, from the X field);
// the A bus is cut to that width. The PC has no reset of its own: the control
// unit's reset1 state loads 0, as in the document.
module easy1_pc
  import easy1_pkg::*;
#(
  parameter int unsigned AW = X_W
) (
  input  logic          clk,
  input  logic [AW-1:0] abus,
  input  logic [1:0]    pc_sel,
  input  logic          pc_is,
  output logic [AW-1:0] pc
);

  logic [AW-1:0] add_in, add_out, pc_d;

  always_comb begin
    add_in  = pc_is ? pc : abus;
    add_out = add_in + AW'(2);
    unique case (pc_sel)
      PC_ABUS: pc_d = abus;
      PC_ZERO: pc_d = '0;
      PC_INC:  pc_d = add_out;
      default: pc_d = pc;
    endcase
  end

  always_ff @(posedge clk) pc <= pc_d;

endmodule
