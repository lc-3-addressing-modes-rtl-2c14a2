// tb_lc3_sp_save: SP +/- 1 and the user/supervisor stack-pointer swap.
module tb_lc3_sp_save;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ld_saved_usp, ld_saved_ssp;
  spmux_e spmux;
  word_t r6, sp_out, saved_usp, saved_ssp;

  lc3_sp_save dut (.*);
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
    rst = 1; ld_saved_usp = 0; ld_saved_ssp = 0; spmux = SP_INC; r6 = 0;
    @(posedge clk); #1 rst = 0;
    chk("Saved_SSP reset", saved_ssp, 16'h3000);
    // Fig. stack example: push from x3456 gives x3455, pop gives it back.
    r6 = 16'h3456; spmux = SP_DEC; #1 chk("push", sp_out, 16'h3455);
    r6 = 16'h3455; spmux = SP_INC; #1 chk("pop", sp_out, 16'h3456);
    r6 = 16'h0000; spmux = SP_DEC; #1 chk("wrap", sp_out, 16'hFFFF);
    // Entry from user mode: save user SP, take supervisor SP.
    r6 = 16'hF000; spmux = SP_SSP; ld_saved_usp = 1; #1 chk("SSP to bus", sp_out, 16'h3000);
    @(posedge clk); #1 ld_saved_usp = 0;
    chk("Saved_USP", saved_usp, 16'hF000);
    // Return to user mode: save supervisor SP, restore user SP.
    r6 = 16'h2FF0; spmux = SP_USP; ld_saved_ssp = 1; #1 chk("USP to bus", sp_out, 16'hF000);
    @(posedge clk); #1 ld_saved_ssp = 0;
    chk("Saved_SSP", saved_ssp, 16'h2FF0);
    for (int i = 0; i < 500; i++) begin
      r6 = 16'($urandom); spmux = spmux_e'($urandom_range(0, 1)); #1;
      chk("random", sp_out, spmux == SP_INC ? 16'(r6 + 1) : 16'(r6 - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
