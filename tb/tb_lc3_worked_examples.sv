// tb_lc3_worked_examples: the small worked examples, run on lc3_system at its defaults.
//
// Each example resets the system, loads a few words, runs until the PC
// reaches a spin loop (BR to itself) and checks the registers and memory:
//   1. LDI R2 at x3000 through the pointer at x3003 (xFE02) to the data x1234.
//   2. TRAP x02 at x3000 with M[x0002] = x1234: PC -> x1234, R7 = x3001.
//   3. A keyboard interrupt of the instruction at x3020 with M[x0180] = x1234:
//      the supervisor stack gets PSR and x3020, PC -> x1234.
//   4. Compiler-style start-up: R6/R5 <- xF000, R4 <- global data, R7 <- main,
//      JSRR R7; main saves R7 on the stack, reads global data through R4, calls
//      func through the table entry (loaded with LDR, then JSRR), returns, HALT.
//   5. Stack at x3456: read the top item, push xABC7, pop it into R3.
//   6. Nesting: an illegal opcode inside the keyboard routine. The inner entry
//      stays on the supervisor stack (no pointer swap); the inner RTI stays in
//      supervisor mode and the outer RTI restores the user stack pointer.
module tb_lc3_worked_examples;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst, key_valid;
  logic [7:0] key_data;
  logic io_en, io_we, io_ready;
  logic [4:0] io_addr;
  word_t io_wdata, io_rdata, pc, psr;
  state_e state;

  lc3_system dut (.*);
  always #5 clk = ~clk;
  assign io_ready = io_en;
  assign io_rdata = '0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog at pc %h", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, word_t got, word_t e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s got %h expected %h", w, got, e); end
  endtask

  function automatic word_t R(int i); return dut.u_cpu.u_regfile.regs[i]; endfunction
  task automatic poke(word_t a, word_t d); dut.u_mem.mem[a] = d; endtask

  task automatic start();
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  // Run until the instruction at `spin` (a BR to itself) has been fetched twice.
  task automatic run_to(word_t spin);
    int seen = 0;
    while (seen < 2) begin
      @(posedge clk);
      if (state == S_FETCH && pc == spin) seen++;
    end
    #1;
  endtask

  initial begin
    key_valid = 0; key_data = 0;

    // 1. LDI through a pointer.
    poke(16'h3000, LDI(2, 2));
    poke(16'h3001, BR(7, -1));
    poke(16'h3003, 16'hFE02);
    poke(16'hFE02, 16'h1234);
    start(); run_to(16'h3001);
    chk("LDI: R2", R(2), 16'h1234);

    // 2. TRAP through the trap vector table.
    poke(16'h3000, TRAP(8'h02));
    poke(16'h0002, 16'h1234);
    poke(16'h1234, BR(7, -1));
    start(); run_to(16'h1234);
    chk("TRAP: R7", R(7), 16'h3001);
    chk("TRAP: still user mode", {15'b0, psr[15]}, 16'd1);

    // 3. Keyboard interrupt of the instruction at x3020.
    poke(16'h3000, LD(1, 16'h3030 - 16'h3001));      // R1 <- x4000
    poke(16'h3001, BR(7, 16'h301F - 16'h3002));
    poke(16'h301F, STI(1, 16'h3031 - 16'h3020));     // KBSR.IE <- 1
    poke(16'h3020, ADDi(1, 1, 1));
    poke(16'h3030, 16'h4000);
    poke(16'h3031, 16'hFFE0);
    poke(16'h0180, 16'h1234);
    start();
    @(posedge clk);
    key_data <= 8'h20; key_valid <= 1;               // a key is already waiting
    @(posedge clk);
    key_valid <= 0;
    run_to(16'h1234);
    chk("INT: pushed PC", dut.u_mem.mem[16'h2FFE], 16'h3020);
    chk("INT: pushed PSR", dut.u_mem.mem[16'h2FFF], 16'h8001);
    chk("INT: supervisor R6", R(6), 16'h2FFE);
    chk("INT: PSR now", psr, 16'h0401);
    chk("INT: x3020 not executed", R(1), 16'h4000);

    // 4. Compiler-style start-up and calls through R4.
    poke(16'h3000, LD(6, 5));
    poke(16'h3001, LD(5, 4));
    poke(16'h3002, LD(4, 4));
    poke(16'h3003, LD(7, 4));
    poke(16'h3004, JSRR(7));
    poke(16'h3005, TRAP(8'h25));
    poke(16'h3006, 16'hF000);                        // STACK_POINTER
    poke(16'h3007, 16'h3020);                        // GLOBAL_DATA_POINTER
    poke(16'h3008, 16'h3010);                        // GLOBAL_MAIN_POINTER
    poke(16'h3010, ADDi(6, 6, -1));                  // main: push R7
    poke(16'h3011, STR(7, 6, 0));
    poke(16'h3012, ADDi(0, 4, 2));                   // get data
    poke(16'h3013, LDR(2, 0, 0));
    poke(16'h3014, LDR(0, 4, 3));                    // func's address from the table
    poke(16'h3015, JSRR(0));
    poke(16'h3016, LDR(7, 6, 0));                    // pop R7
    poke(16'h3017, ADDi(6, 6, 1));
    poke(16'h3018, JMP(7));
    poke(16'h3019, ADDi(3, 3, 1));                   // func
    poke(16'h301A, JMP(7));
    poke(16'h3020, 16'h1234);
    poke(16'h3021, 16'h3000);
    poke(16'h3022, 16'h0002);
    poke(16'h3023, 16'h3019);
    poke(16'h0025, 16'h0400);
    poke(16'h0400, BR(7, -1));
    start(); run_to(16'h0400);
    chk("C: R2 global data", R(2), 16'h0002);
    chk("C: R3 func ran once", R(3), 16'h0001);
    chk("C: R4", R(4), 16'h3020);
    chk("C: R5", R(5), 16'hF000);
    chk("C: R6 balanced", R(6), 16'hF000);
    chk("C: saved return address", dut.u_mem.mem[16'hEFFF], 16'h3005);
    chk("C: R7 after HALT trap", R(7), 16'h3006);

    // 5. Stack at x3456.
    poke(16'h3000, LD(6, 16'h3010 - 16'h3001));      // R6 <- x3456
    poke(16'h3001, LD(1, 16'h3011 - 16'h3002));      // R1 <- xABC7
    poke(16'h3002, LDR(2, 6, 0));                    // top item
    poke(16'h3003, ADDi(6, 6, -1));                  // push R1
    poke(16'h3004, STR(1, 6, 0));
    poke(16'h3005, LDR(3, 6, 0));                    // pop R3
    poke(16'h3006, ADDi(6, 6, 1));
    poke(16'h3007, BR(7, -1));
    poke(16'h3010, 16'h3456);
    poke(16'h3011, 16'hABC7);
    poke(16'h3456, 16'hFFFF);
    start(); run_to(16'h3007);
    chk("stack: top item", R(2), 16'hFFFF);
    chk("stack: pushed", dut.u_mem.mem[16'h3455], 16'hABC7);
    chk("stack: popped", R(3), 16'hABC7);
    chk("stack: R6", R(6), 16'h3456);

    // 6. Exception nested in an interrupt routine.
    poke(16'h3000, LD(1, 16'h3030 - 16'h3001));
    poke(16'h3001, BR(7, 16'h301F - 16'h3002));
    poke(16'h301F, STI(1, 16'h3031 - 16'h3020));
    poke(16'h3020, ADDi(1, 1, 1));
    poke(16'h3021, BR(7, -1));
    poke(16'h3030, 16'h4000);
    poke(16'h3031, 16'hFFE0);
    poke(16'h0180, 16'h0440);
    poke(16'h0440, ILLEGAL());                       // keyboard routine
    poke(16'h0441, LDI(2, 16'h0444 - 16'h0442));
    poke(16'h0442, RTI());
    poke(16'h0444, 16'hFFE2);
    poke(16'h0100, 16'h0420);
    poke(16'h0420, LDR(0, 6, 0));                    // illegal-opcode handler
    poke(16'h0421, ADDi(0, 0, 1));
    poke(16'h0422, STR(0, 6, 0));
    poke(16'h0423, ADDi(5, 5, 1));
    poke(16'h0424, RTI());
    start();
    @(posedge clk);
    key_data <= 8'h20; key_valid <= 1;
    @(posedge clk);
    key_valid <= 0;
    run_to(16'h3021);
    chk("nest: inner pushed PC", dut.u_mem.mem[16'h2FFC], 16'h0441);
    chk("nest: inner pushed PSR", dut.u_mem.mem[16'h2FFD], 16'h0401);
    chk("nest: outer pushed PC", dut.u_mem.mem[16'h2FFE], 16'h3020);
    chk("nest: handler ran once", R(5), 16'h0001);
    chk("nest: key read", R(2), 16'h0020);
    chk("nest: x3020 ran after return", R(1), 16'h4001);
    chk("nest: user R6 restored", R(6), 16'h0000);
    chk("nest: Saved_SSP", dut.u_cpu.saved_ssp, 16'h3000);
    chk("nest: user PSR", psr, 16'h8001);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
