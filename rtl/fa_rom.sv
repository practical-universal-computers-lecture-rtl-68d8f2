// fa_rom: a full adder built as a ROM, the document's example of ROM
// implementation technology.
//
// The three inputs A, B, Cin form a 3-bit ROM address. A decoder turns the
// address into one of eight word lines; the programmed array then puts the
// selected word on two bit lines, S and Cout. The document draws this as an
// NMOS NOR array with pull-ups; the contents here are the full adder's truth
// table, S = A xor B xor Cin and Cout = majority(A, B, Cin), each word
// computed from those formulas. Purely combinational.
module fa_rom (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  typedef logic [1:0] fa_word_t;  // {cout, s}

  function automatic fa_word_t fa_word(int unsigned addr);
    logic x, y, z;
    {x, y, z} = 3'(addr);
    return {(x & y) | (x & z) | (y & z), x ^ y ^ z};
  endfunction

  logic [7:0] word_line;
  fa_word_t   bit_lines;

  // Address decoder: exactly one word line is active.
  always_comb begin
    word_line = '0;
    word_line[{a, b, cin}] = 1'b1;
  end

  // Programmed array: each bit line is the OR of the word lines whose word
  // holds a 1 in that column.
  always_comb begin
    bit_lines = '0;
    for (int unsigned i = 0; i < 8; i++)
      if (word_line[i]) bit_lines |= fa_word(i);
  end

  assign {cout, s} = bit_lines;

endmodule
