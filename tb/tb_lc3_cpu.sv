// tb_lc3_cpu: the processor against a bench memory with random wait states.
//
// Runs the pointer example (LEA, ADD, ST, AND, STR, LDI), a stack push and
// pop through R6 (ADD/STR, LDR/ADD), and checks the results. The bench memory
// answers each access after 1 to 3 cycles. A second run with single-cycle
// memory checks the cycle count of an ADD (5 cycles: 18, 33, 35, 32, 1).
module tb_lc3_cpu;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, mem_en, mem_we, mem_ready, irq;
  logic [2:0] irq_priority;
  word_t mem_addr, mem_wdata, mem_rdata, pc, ir, psr;
  state_e state;
  word_t mem [word_t];
  int wait_left = -1;
  bit slow = 1;

  lc3_cpu dut (.*);
  always #5 clk = ~clk;

  // Bench memory.
  assign mem_rdata = mem.exists(mem_addr) ? mem[mem_addr] : 16'h0000;
  assign mem_ready = mem_en && (!slow || wait_left == 0);
  always @(posedge clk) begin
    if (mem_en && mem_ready) begin
      if (mem_we) mem[mem_addr] = mem_wdata;
      wait_left <= -1;
    end else if (!mem_en) wait_left <= -1;
    else if (wait_left < 0) wait_left <= $urandom_range(0, 2);
    else wait_left <= wait_left - 1;
  end
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, word_t got, word_t e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s got %h expected %h", w, got, e); end
  endtask

  function automatic word_t R(int i); return dut.u_regfile.regs[i]; endfunction

  initial begin
    int n;
    irq = 0; irq_priority = 0;
    rst = 1;
    mem.delete();
    // x3000: jump to the pointer example at x30F6.
    mem[16'h3000] = BR(7, 16'h30F6 - 16'h3001);
    mem[16'h30F6] = LEA(1, -3);
    mem[16'h30F7] = ADDi(2, 1, 14);
    mem[16'h30F8] = ST(2, -5);
    mem[16'h30F9] = ANDi(2, 2, 0);
    mem[16'h30FA] = ADDi(2, 2, 5);
    mem[16'h30FB] = STR(2, 1, 14);
    mem[16'h30FC] = LDI(3, -9);
    mem[16'h30FD] = LD(6, 16'h3180 - 16'h30FE);     // R6 <- x3456
    mem[16'h30FE] = LD(1, 16'h3181 - 16'h30FF);     // R1 <- xABC7
    mem[16'h30FF] = ADDi(6, 6, -1);                 // push R1
    mem[16'h3100] = STR(1, 6, 0);
    mem[16'h3101] = BR(7, 16'h3110 - 16'h3102);     // jump over the data
    mem[16'h3110] = LDR(7, 6, 0);                   // pop into R7
    mem[16'h3111] = ADDi(6, 6, 1);
    mem[16'h3112] = BR(7, -1);                      // spin
    mem[16'h3180] = 16'h3456;
    mem[16'h3181] = 16'hABC7;
    mem[16'h3456] = 16'hFFFF;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    wait (pc == 16'h3113);
    @(posedge clk); #1;
    chk("R1 pointer example / pushed value", R(1), 16'hABC7);
    chk("R2", R(2), 16'h0005);
    chk("R3 = M[M[x30F4]]", R(3), 16'h0005);
    chk("M[x30F4]", mem[16'h30F4], 16'h3102);
    chk("M[x3102]", mem[16'h3102], 16'h0005);
    chk("pushed M[x3455]", mem[16'h3455], 16'hABC7);
    chk("below untouched M[x3456]", mem[16'h3456], 16'hFFFF);
    chk("popped R7", R(7), 16'hABC7);
    chk("R6 back", R(6), 16'h3456);
    chk("PSR (P from ADD)", psr, 16'h8001);

    // Cycle count of ADD with single-cycle memory.
    slow = 0;
    mem[16'h3000] = ADDi(0, 0, 1);
    mem[16'h3001] = ADDi(0, 0, 1);
    rst = 1; repeat (2) @(posedge clk); #1 rst = 0;
    n = 0;
    while (!(state == S_FETCH && pc == 16'h3001)) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != 5) begin failures++; $display("FAIL ADD took %0d cycles, expected 5", n); end

    // Illegal opcode at x3002 in user mode: the supervisor stack receives
    // PSR and the address of the offending instruction, PC takes M[x0100].
    mem[16'h3000] = LD(6, 16'h3010 - 16'h3001);     // user stack xF000
    mem[16'h3001] = ADDi(0, 0, -1);                 // N
    mem[16'h3002] = ILLEGAL();
    mem[16'h3010] = 16'hF000;
    mem[16'h0100] = 16'h0500;
    mem[16'h0500] = BR(7, -1);
    rst = 1; repeat (2) @(posedge clk); #1 rst = 0;
    wait (pc == 16'h0501);
    @(posedge clk); #1;
    chk("pushed PSR", mem[16'h2FFF], 16'h8004);
    chk("pushed PC", mem[16'h2FFE], 16'h3002);
    chk("supervisor SP", R(6), 16'h2FFE);
    chk("supervisor PSR", psr, 16'h0004);
    chk("Saved_USP", dut.saved_usp, 16'hF000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
