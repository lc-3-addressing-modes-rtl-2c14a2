// tb_lc3_vector: vector ROM contents and the Vect_Reg load/hold behaviour.
module tb_lc3_vector;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ld_vector;
  cause_e cause;
  word_t vect_reg;

  lc3_vector dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, word_t got, word_t e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s got %h expected %h", w, got, e); end
  endtask

  initial begin
    rst = 1; ld_vector = 0; cause = CAUSE_ILLOP;
    @(posedge clk); #1 rst = 0;
    cause = CAUSE_KBD; ld_vector = 1; @(posedge clk); #1 chk("keyboard", vect_reg, 16'h0180);
    cause = CAUSE_ILLOP;              @(posedge clk); #1 chk("illegal opcode", vect_reg, 16'h0100);
    cause = CAUSE_PRIV;               @(posedge clk); #1 chk("privilege", vect_reg, 16'h0101);
    ld_vector = 0; cause = CAUSE_KBD; @(posedge clk); #1 chk("hold", vect_reg, 16'h0101);
    checks++;
    if (vect_reg[15:8] !== 8'h01) begin failures++; $display("FAIL outside x0100-x01FF"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
