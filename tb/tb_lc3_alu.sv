// tb_lc3_alu: random and directed checks of the ALU against a reference.
module tb_lc3_alu;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  word_t a, sr2, ir, y, b, exp;

  lc3_alu dut (.op, .a, .sr2, .ir, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op  = alu_op_e'($urandom_range(0, 3));
      a   = 16'($urandom);
      sr2 = 16'($urandom);
      ir  = 16'($urandom);
      if (i == 0) begin op = ALU_ADD; a = 16'h30F4; ir = 16'h1000 | 16'h0020 | 16'd14; end
      #1;
      b = ir[5] ? 16'(signed'(ir[4:0])) : sr2;
      case (op)
        ALU_ADD: exp = 16'(int'(a) + int'(b));
        ALU_AND: exp = a & b;
        ALU_NOT: exp = a ^ 16'hFFFF;
        default: exp = a;
      endcase
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL op %s a %h b %h: got %h expected %h", op.name(), a, b, y, exp);
      end
      if (i == 0 && y !== 16'h3102) begin failures++; $display("FAIL ADD R2,R1,#14"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
