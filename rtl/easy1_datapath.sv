// easy1_datapath: the Easy I data paths with their control points.
//
// Registers DI (data in), AC (accumulator), AO (address out) and the PC sit
// around a single internal A bus, as in the document's data path drawing:
//   - DI loads the external data bus (EDB) when di_le is set and drives the
//     A bus.
//   - The ALU takes the A bus on input A and AC on input B; AC loads the ALU
//     result when ac_le is set.
//   - The PC loads from the A bus, zero, or its +2 adder (see easy1_pc).
//   - AO loads the PC (ao_sel=0) or the A bus (ao_sel=1) when ao_le is set
//     and drives the external address bus (EAB).
//   - The EDB output mux sends DI (edb_sel=0) or AC (edb_sel=1) to memory.
//
// The document calls DI, AC and AO latches ("le" = latch enable); here all
// are edge-triggered registers that load at the clock edge ending the cycle
// in which their enable is set. The control unit must branch on the opcode
// in the same fetch cycle that reads it, before DI holds it, so besides
// DI<10:14> the data paths also hand the opcode bits of the incoming data
// bus word to the control unit (edb_opcode); see easy1_cu_hardwired.
//
// The A bus carries DI<0:9>, zero-extended, unless abus_full is set, when it
// carries the whole DI word (only load3 needs that); this control point is
// this design's addition, see easy1_pkg.
//
// DI, AC and AO are cleared by rst so that simulation starts from known
// values; the document only has the control unit's reset states load the PC
// and AO.
module easy1_datapath
  import easy1_pkg::*;
#(
  parameter int unsigned AW = X_W
) (
  input  logic          clk,
  input  logic          rst,
  input  ctrl_t         ctrl,
  input  word_t         edb_in,   // data bus, memory to CPU
  output word_t         edb_out,  // data bus, CPU to memory
  output logic [AW-1:0] eab,      // address bus
  output opcode_t       opcode,   // DI<10:14>, to the control unit
  output opcode_t       edb_opcode, // EDB<10:14>, to the control unit
  output logic          ac15,     // AC:15, to the control unit
  output word_t         ac,
  output logic [AW-1:0] pc,
  output word_t         di
);

  word_t         di_q, ac_q, abus, alu_y;
  logic [AW-1:0] ao_q;

  // DI: loads the data bus.
  always_ff @(posedge clk) begin
    if (rst)             di_q <= '0;
    else if (ctrl.di_le) di_q <= edb_in;
  end
  assign di = di_q;

  assign abus = ctrl.abus_full ? di_q : {{(WORD_W-X_W){1'b0}}, di_q[X_W-1:0]};

  easy1_alu u_alu (
    .a  (abus),
    .b  (ac_q),
    .op (ctrl.alu_op),
    .y  (alu_y)
  );

  always_ff @(posedge clk) begin
    if (rst)             ac_q <= '0;
    else if (ctrl.ac_le) ac_q <= alu_y;
  end

  easy1_pc #(.AW(AW)) u_pc (
    .clk    (clk),
    .abus   (abus[AW-1:0]),
    .pc_sel (ctrl.pc_sel),
    .pc_is  (ctrl.pc_is),
    .pc     (pc)
  );

  always_ff @(posedge clk) begin
    if (rst)             ao_q <= '0;
    else if (ctrl.ao_le) ao_q <= ctrl.ao_sel ? abus[AW-1:0] : pc;
  end

  assign eab     = ao_q;
  assign edb_out = ctrl.edb_sel ? ac_q : di_q;
  assign opcode     = di_q[X_W +: OP_W];
  assign edb_opcode = edb_in[X_W +: OP_W];
  assign ac15    = ac_q[WORD_W-1];
  assign ac      = ac_q;

endmodule
