// tb_lc3_psr: condition codes, PSR load, supervisor entry, priority and BEN.
module tb_lc3_psr;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ld_cc, ld_psr, set_super, ld_priority, ben;
  logic [2:0] priority_in;
  word_t bus, ir, psr;

  lc3_psr dut (.*);
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

  task automatic step();
    @(posedge clk); #1;
    ld_cc = 0; ld_psr = 0; set_super = 0; ld_priority = 0;
  endtask

  initial begin
    rst = 1; ld_cc = 0; ld_psr = 0; set_super = 0; ld_priority = 0;
    priority_in = 0; bus = 0; ir = 0;
    step(); rst = 0;
    chk("reset", psr, 16'h8002);
    bus = 16'h8000; ld_cc = 1; step(); chk("N", psr, 16'h8004);
    bus = 16'h0000; ld_cc = 1; step(); chk("Z", psr, 16'h8002);
    bus = 16'h1234; ld_cc = 1; step(); chk("P", psr, 16'h8001);
    // Interrupt entry: supervisor, priority 4, CC kept.
    set_super = 1; ld_priority = 1; priority_in = 3'd4; step();
    chk("int entry", psr, 16'h0401);
    // RTI pops a user PSR.
    bus = 16'h8704; ld_psr = 1; step(); chk("pop PSR", psr, 16'h8704);
    // BEN for every nzp field and CC.
    for (int cc = 0; cc < 3; cc++) begin
      bus = (cc == 0) ? 16'hFFFF : (cc == 1) ? 16'h0000 : 16'h0001;
      ld_cc = 1; step();
      for (int f = 0; f < 8; f++) begin
        ir = {4'h0, 3'(f), 9'h000}; #1;
        chk("BEN", {15'b0, ben}, {15'b0, |(3'(f) & (3'b100 >> cc))});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
