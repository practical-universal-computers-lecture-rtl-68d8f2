// easy1_cu_ref_pkg: reference control unit table for the Easy I testbenches.
//
// The state transition table is written out row by row as text, in the
// binary form of the published table ("x" = don't care), and matched at run
// time. It is kept apart from the RTL's own table on purpose. Columns:
//   state opcode AC15 | next ALUop MemOP PCsel PCis DIle ACle AOsel AOle EDBsel abus_full
// Differences from the published rows, all deliberate in this design:
//   - fetch reads memory (RD) for every opcode, Comp/ShR included;
//   - store2 returns to fetch (the flowchart and the microprogram do so);
//   - load3 uses ALU op 000 (pass A) to move DI into AC;
//   - only the low opcode bit picks And/Add and Comp/ShR;
//   - abus_full (whole DI word on the A bus) is set in load3 and clear in
//     aopr, don't care elsewhere.
package easy1_cu_ref_pkg;

  localparam int NROWS = 20;

  localparam string ROWS [NROWS] = '{
    "0000 xxxxx x 0001 xxx 00 01 x 0 0 x 0 x x",
    "0001 xxxxx x 0010 xxx 00 10 1 0 0 0 1 x x",
    "0010 xx00x x 0100 xxx 01 11 x 1 0 x 0 x x",
    "0010 xx010 x 1011 xxx 01 11 x 1 0 x 0 x x",
    "0010 xx011 x 1101 xxx 01 11 x 1 0 x 0 x x",
    "0010 xx100 x 0101 xxx 01 11 x 1 0 x 0 x x",
    "0010 xx101 x 1000 xxx 01 11 x 1 0 x 0 x x",
    "0010 xx11x x 0011 xxx 01 11 x 1 0 x 0 x x",
    "0011 xxxx0 x 0010 010 00 10 1 0 1 0 1 x 0",
    "0011 xxxx1 x 0010 011 00 10 1 0 1 0 1 x 0",
    "0100 xxxx0 x 0010 001 00 10 1 0 1 0 1 x x",
    "0100 xxxx1 x 0010 100 00 10 1 0 1 0 1 x x",
    "0101 xxxxx x 0110 xxx 00 11 x 0 0 1 1 x x",
    "0110 xxxxx x 0010 xxx 10 10 1 0 0 0 1 1 x",
    "1000 xxxxx x 1001 xxx 00 11 x 0 0 1 1 x x",
    "1001 xxxxx x 1010 xxx 01 11 x 1 0 x 0 x x",
    "1010 xxxxx x 0010 000 00 10 1 0 1 0 1 x 1",
    "1011 xxxxx 0 0010 xxx 00 10 1 0 0 0 1 x x",
    "1011 xxxxx 1 1100 xxx 00 10 1 0 0 0 1 x x",
    "1100 xxxxx x 0010 xxx 00 10 0 0 0 1 1 x x"
  };
  // jump (1101) behaves like brn2.
  localparam string JUMP_ROW = "1101 xxxxx x 0010 xxx 00 10 0 0 0 1 1 x x";

  // Strip blanks: 10 input characters then 18 output characters.
  function automatic string squeeze(string r);
    string o = "";
    for (int i = 0; i < r.len(); i++)
      if (r[i] != " ") o = {o, string'(r[i])};
    return o;
  endfunction

  // Does bit-string pattern p (with x) match value v, MSB first?
  function automatic bit match(string p, int unsigned v, int n);
    for (int i = 0; i < n; i++) begin
      byte c = p[i];
      bit  b = v[n-1-i];
      if (c == "0" && b) return 0;
      if (c == "1" && !b) return 0;
    end
    return 1;
  endfunction

  // Look up state/opcode/ac15; returns the 18-character output pattern
  // (next state, ALU op, mem op, PC sel, PC is, DI le, AC le, AO sel, AO le,
  // EDB sel, abus_full) or "" if no row matches.
  function automatic string lookup(logic [3:0] st, logic [4:0] op, logic ac15);
    string r;
    for (int k = 0; k <= NROWS; k++) begin
      r = squeeze(k < NROWS ? ROWS[k] : JUMP_ROW);
      if (match(r.substr(0, 3), st, 4) && match(r.substr(4, 8), op, 5) &&
          match(r.substr(9, 9), ac15, 1))
        return r.substr(10, 27);
    end
    return "";
  endfunction

endpackage
