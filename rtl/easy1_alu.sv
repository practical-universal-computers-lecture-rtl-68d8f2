// easy1_alu: the Easy I arithmetic/logic unit.
//
// Purely combinational. Input A comes from the A bus, input B from the
// accumulator. The five operations and their 3-bit codes are the document's
// ALU operation table: A, not B, A and B, A + B, B / 2. The remaining codes
// (101-111) are not defined there; here they pass A. B / 2 is taken as an
// arithmetic right shift (the sign bit is kept), since AC is read as a signed
// number by BrN; the document only writes "B / 2". The adder drops its carry.
module easy1_alu
  import easy1_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_t op,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_NOTB: y = ~b;
      ALU_AND:  y = a & b;
      ALU_ADD:  y = a + b;
      ALU_SHRB: y = {b[WORD_W-1], b[WORD_W-1:1]};
      default:  y = a;  // ALU_A and the undefined codes
    endcase
  end

endmodule
