// tb_lc3_control: state sequences of every instruction, exception and interrupt.
//
// For each case the bench holds the controller's inputs as a processor would
// and compares the visited state numbers with the LC-3 state sequence written
// out by hand below. It also checks a few control words (fetch, LD, push) and
// that memory states wait for `mem_ready`.
module tb_lc3_control;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, ir11, ben, psr15, int_req, mem_ready;
  opcode_e opcode;
  state_e state;
  ctrl_t ctrl;

  lc3_control dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run from fetch until the next return to fetch; compare the visited states.
  task automatic run(string name, int body[$], bit with_fetch = 1);
    int got[$];
    int exp[$];
    int guard = 0;
    if (with_fetch) exp = {18, 33, 35, 32, body};
    else            exp = body;
    rst = 1; @(posedge clk); #1 rst = 0;
    do begin
      got.push_back(int'(state));
      @(posedge clk); #1;
      guard++;
    end while (state != S_FETCH && guard < 100);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %p expected %p", name, got, exp);
    end
  endtask

  initial begin
    rst = 1; ir11 = 0; ben = 0; psr15 = 0; int_req = 0; mem_ready = 1; opcode = OP_ADD;
    opcode = OP_ADD;  run("ADD",  {1});
    opcode = OP_AND;  run("AND",  {5});
    opcode = OP_NOT;  run("NOT",  {9});
    opcode = OP_LEA;  run("LEA",  {14});
    opcode = OP_LD;   run("LD",   {2, 25, 27});
    opcode = OP_LDR;  run("LDR",  {6, 25, 27});
    opcode = OP_LDI;  run("LDI",  {10, 24, 26, 25, 27});
    opcode = OP_ST;   run("ST",   {3, 23, 16});
    opcode = OP_STR;  run("STR",  {7, 23, 16});
    opcode = OP_STI;  run("STI",  {11, 29, 31, 23, 16});
    opcode = OP_BR;   ben = 0; run("BR not taken", {0});
    opcode = OP_BR;   ben = 1; run("BR taken", {0, 22});
    opcode = OP_JMP;  run("JMP",  {12});
    opcode = OP_JSR;  ir11 = 1; run("JSR",  {4, 21});
    opcode = OP_JSR;  ir11 = 0; run("JSRR", {4, 20});
    opcode = OP_TRAP; run("TRAP", {15, 28, 30});
    opcode = OP_RTI;  psr15 = 0; run("RTI to supervisor", {8, 36, 38, 39, 40, 42, 34});
    opcode = OP_RES;  psr15 = 0; run("illegal opcode, supervisor",
                                     {13, 37, 41, 43, 47, 48, 50, 52, 54});
    opcode = OP_RES;  psr15 = 1; run("illegal opcode, user",
                                     {13, 45, 37, 41, 43, 47, 48, 50, 52, 54});
    opcode = OP_RTI;  psr15 = 1; run("RTI in user mode",
                                     {8, 44, 45, 37, 41, 43, 47, 48, 50, 52, 54});
    opcode = OP_ADD;  psr15 = 1; int_req = 1; run("interrupt", {18, 49, 45, 37, 41, 43, 47, 48, 50, 52, 54}, 0);
    int_req = 0; psr15 = 0;

    // RTI returning to user mode: PSR[15] becomes 1 when state 42 loads it.
    begin
      int got[$];
      int exp[$] = '{18, 33, 35, 32, 8, 36, 38, 39, 40, 42, 34, 59};
      opcode = OP_RTI; psr15 = 0;
      rst = 1; @(posedge clk); #1 rst = 0;
      do begin
        got.push_back(int'(state));
        if (state == S_POPSP) psr15 = 1;
        @(posedge clk); #1;
      end while (state != S_FETCH);
      checks++;
      if (got != exp) begin
        failures++; $display("FAIL RTI to user: %p", got);
      end
      psr15 = 0;
    end

    // Memory waits: state 33 holds until ready.
    opcode = OP_ADD; mem_ready = 0;
    rst = 1; @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;
    repeat (4) begin
      checks++;
      if (state != S_FETCHRD || !ctrl.mio_en || ctrl.r_w) begin failures++; $display("FAIL wait in 33"); end
      @(posedge clk); #1;
    end
    mem_ready = 1; @(posedge clk); #1;
    checks++;
    if (state != S_LDIR) begin failures++; $display("FAIL leave 33: %0d", state); end

    // Control words.
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++;
    if (!(ctrl.ld_mar && ctrl.ld_pc && ctrl.bus_sel == BUS_PC && ctrl.pcmux == PC_INC && !ctrl.ld_reg)) begin
      failures++; $display("FAIL fetch control word");
    end
    opcode = OP_LD;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (!(state == S_LD && ctrl.ld_mar && ctrl.bus_sel == BUS_MARMUX && ctrl.addr1 == A1_PC &&
          ctrl.addr2 == A2_OFF9 && ctrl.marmux == MM_ADDER)) begin
      failures++; $display("FAIL LD control word");
    end
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (!(state == S_LDWB && ctrl.ld_reg && ctrl.ld_cc && ctrl.bus_sel == BUS_MDR && ctrl.drmux == DR_IR11)) begin
      failures++; $display("FAIL LD write-back control word");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
