// easy1_alu_tb: self-checking test of the Easy I ALU.
// Drives every operation code with edge-case and random operands and
// compares with the operation table: A, not B, A and B, A + B (mod 2^16),
// B / 2 with the sign kept. Codes 101-111 must pass A.
module easy1_alu_tb;
  import easy1_pkg::*;

  word_t   a, b, y, exp_y;
  alu_op_t op;
  int checks = 0, failures = 0;

  easy1_alu dut (.a(a), .b(b), .op(op), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(word_t ta, word_t tb_, logic [2:0] code);
    a = ta; b = tb_; op = alu_op_t'(code);
    #1;
    case (code)
      3'd1:    exp_y = 16'hFFFF ^ tb_;
      3'd2:    exp_y = ta & tb_;
      3'd3:    exp_y = 16'((32'(ta) + 32'(tb_)) % 65536);
      3'd4:    exp_y = 16'($signed(tb_) >>> 1);
      default: exp_y = ta;
    endcase
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h expected %h", code, ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    word_t edge_vals [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5A5A};
    foreach (edge_vals[i]) foreach (edge_vals[j])
      for (int c = 0; c < 8; c++) check_one(edge_vals[i], edge_vals[j], 3'(c));
    repeat (2000) check_one(16'($urandom), 16'($urandom), 3'($urandom_range(0, 7)));
    // Specific values from the ISA: ShR of -6 is -3, of 6 is 3.
    check_one(16'h0000, 16'hFFFA, 3'd4);
    check_one(16'h0000, 16'h0006, 3'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
