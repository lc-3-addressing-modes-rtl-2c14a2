// tb_lc3_addr_unit: checks every ADDR1MUX/ADDR2MUX/MARMUX combination.
module tb_lc3_addr_unit;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  word_t ir, pc, base, adder, marmux_out, b1, b2, exp;
  addr1_e addr1;
  addr2_e addr2;
  marmux_e marmux;

  lc3_addr_unit dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, word_t got, word_t e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s got %h expected %h", w, got, e); end
  endtask

  initial begin
    // Worked examples: LEA R1,#-3 at x30F6 and LDI R3,#-9 at x30FC.
    ir = 16'hE3FD; pc = 16'h30F7; base = '0; addr1 = A1_PC; addr2 = A2_OFF9; marmux = MM_ADDER;
    #1 chk("LEA example", marmux_out, 16'h30F4);
    ir = 16'hA7F7; pc = 16'h30FD;
    #1 chk("LDI example", adder, 16'h30F4);
    ir = 16'hF025; marmux = MM_TRAPVECT;
    #1 chk("TRAP x25", marmux_out, 16'h0025);
    for (int i = 0; i < 2000; i++) begin
      ir = 16'($urandom); pc = 16'($urandom); base = 16'($urandom);
      addr1 = addr1_e'($urandom_range(0, 1));
      addr2 = addr2_e'($urandom_range(0, 3));
      marmux = marmux_e'($urandom_range(0, 1));
      #1;
      b1 = addr1 == A1_PC ? pc : base;
      case (addr2)
        A2_ZERO:  b2 = 0;
        A2_OFF6:  b2 = 16'(signed'(ir[5:0]));
        A2_OFF9:  b2 = 16'(signed'(ir[8:0]));
        default:  b2 = 16'(signed'(ir[10:0]));
      endcase
      exp = 16'(int'(b1) + int'(b2));
      chk("adder", adder, exp);
      chk("marmux", marmux_out, marmux == MM_ADDER ? exp : {8'h00, ir[7:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
