// easy1_top: Easy I computer systems and the ROM full adder, side by side.
//
// Two complete von Neumann machines, one per control unit design:
//   u_hw_cpu + u_hw_mem   Easy I with the hardwired (ROM FSM) control unit
//   u_mp_cpu + u_mp_mem   Easy I with the microprogrammed control unit
// Each CPU talks to its own memory over an address bus, a data bus (split
// into the two directions) and the NOP/RD/WR control bus. Program and data
// share the memory; it is loaded by writing the memories' mem[] arrays
// (e.g. from a testbench) while rst is held. After rst is released each CPU
// runs reset1, reset2 and then fetches from address 0.
//
// The bus signals and the main registers of both machines are brought out
// for observation. fa_rom, the document's example of logic built as a ROM,
// stands apart with its own ports.
//
// AW is the byte address width (10, the width of the X field).
module easy1_top
  import easy1_pkg::*;
#(
  parameter int unsigned AW = X_W
) (
  input  logic          clk,
  input  logic          rst,
  // hardwired-control machine
  output logic [AW-1:0] hw_eab,
  output mem_op_t       hw_mem_op,
  output word_t         hw_edb_out,
  output word_t         hw_edb_in,
  output state_t        hw_state,
  output word_t         hw_ac,
  output logic [AW-1:0] hw_pc,
  output word_t         hw_di,
  // microprogrammed-control machine
  output logic [AW-1:0] mp_eab,
  output mem_op_t       mp_mem_op,
  output word_t         mp_edb_out,
  output word_t         mp_edb_in,
  output state_t        mp_state,
  output word_t         mp_ac,
  output logic [AW-1:0] mp_pc,
  output word_t         mp_di,
  // ROM full adder
  input  logic          fa_a,
  input  logic          fa_b,
  input  logic          fa_cin,
  output logic          fa_s,
  output logic          fa_cout
);

  easy1_cpu #(.MICROPROGRAMMED(1'b0), .AW(AW)) u_hw_cpu (
    .clk     (clk),
    .rst     (rst),
    .eab     (hw_eab),
    .mem_op  (hw_mem_op),
    .edb_out (hw_edb_out),
    .edb_in  (hw_edb_in),
    .state   (hw_state),
    .ac      (hw_ac),
    .pc      (hw_pc),
    .di      (hw_di)
  );

  easy1_memory #(.AW(AW)) u_hw_mem (
    .clk   (clk),
    .addr  (hw_eab),
    .op    (hw_mem_op),
    .wdata (hw_edb_out),
    .rdata (hw_edb_in)
  );

  easy1_cpu #(.MICROPROGRAMMED(1'b1), .AW(AW)) u_mp_cpu (
    .clk     (clk),
    .rst     (rst),
    .eab     (mp_eab),
    .mem_op  (mp_mem_op),
    .edb_out (mp_edb_out),
    .edb_in  (mp_edb_in),
    .state   (mp_state),
    .ac      (mp_ac),
    .pc      (mp_pc),
    .di      (mp_di)
  );

  easy1_memory #(.AW(AW)) u_mp_mem (
    .clk   (clk),
    .addr  (mp_eab),
    .op    (mp_mem_op),
    .wdata (mp_edb_out),
    .rdata (mp_edb_in)
  );

  fa_rom u_fa_rom (
    .a    (fa_a),
    .b    (fa_b),
    .cin  (fa_cin),
    .s    (fa_s),
    .cout (fa_cout)
  );

endmodule
