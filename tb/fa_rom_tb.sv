// fa_rom_tb: exhaustive check of the ROM full adder against a + b + cin.
module fa_rom_tb;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  fa_rom dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int sum;
      {a, b, cin} = 3'(i);
      #1;
      sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 2'(sum)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b s=%b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
