// lc3_system_checks.svh: stimulus and checks shared by the two system benches.
//
// Included inside a bench module that declares clk, rst, key_valid,
// key_data, the io_* signals, pc, psr, state and an lc3_system instance
// named `dut`. It loads lc3_asm_pkg::test_program into memory, runs it to
// the HALT loop, delivers one key press once the program has enabled
// keyboard interrupts, models a one-cycle external device, and then checks
// registers, memory, PSR, the saved stack pointers and how often each
// mechanism (controller state) was seen.

  int checks = 0, failures = 0;
  int unsigned cycles = 0;
  int unsigned visits [64];
  int unsigned br_not_taken = 0, mem_waits = 0, ext_writes = 0;
  word_t ext_last_addr, ext_last_data;
  bit done = 0;

  initial begin clk = 0; forever #5 clk = ~clk; end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_true(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // External device: answers in the cycle it is addressed.
  assign io_ready = io_en;
  assign io_rdata = 16'h0000;

  always @(posedge clk) if (!rst) begin
    cycles++;
    visits[state]++;
    if (state == S_BR && !dut.u_cpu.ben_q) br_not_taken++;
    if (dut.u_cpu.mem_en && !dut.u_cpu.mem_ready) mem_waits++;
    if (io_en && io_we) begin
      ext_writes++;
      ext_last_addr = {11'h7FF, io_addr};
      ext_last_data = io_wdata;
    end
  end

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    if (!done) begin
      failures++;
      $display("FAIL watchdog expired at pc %h state %0d", pc, state);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin : main
    init_t img[$];
    word_t r [8];
    key_valid = 0;
    key_data  = '0;
    rst = 1;
    test_program(img);
    foreach (img[i]) dut.u_mem.mem[img[i].a] = img[i].d;
    repeat (3) @(posedge clk);
    rst <= 0;

    // Press a key once interrupts are enabled and the program is waiting.
    wait (dut.u_kbd.kb_ie);
    repeat (40) @(posedge clk);
    key_data  <= 8'h41;
    key_valid <= 1;
    @(posedge clk);
    key_valid <= 0;

    // Run to the HALT loop.
    wait (state == S_BRTKN && dut.u_cpu.ir == 16'h0FFF);
    @(posedge clk);
    done = 1;
    for (int i = 0; i < 8; i++) r[i] = dut.u_cpu.u_regfile.regs[i];

    check("R0", r[0], 16'h311E);
    check("R1", r[1], 16'h4000);
    check("R2", r[2], 16'h0041);
    check("R3", r[3], 16'h0005);
    check("R4", r[4], 16'h0041);
    check("R5", r[5], 16'h001D);
    check("R6 user stack restored", r[6], 16'hF000);
    check("R7", r[7], 16'h3124);
    check("PSR", psr, 16'h8001);
    check("pointer M[30F4]", dut.u_mem.mem[16'h30F4], 16'h3102);
    check("data M[3102]", dut.u_mem.mem[16'h3102], 16'h0005);
    check("STI target M[3150]", dut.u_mem.mem[16'h3150], 16'h0005);
    check("FLAG M[3141]", dut.u_mem.mem[16'h3141], 16'h0041);
    check("pushed PSR at interrupt", dut.u_mem.mem[16'h2FFF], 16'h8002);
    check_true("pushed PC at interrupt",
               dut.u_mem.mem[16'h2FFE] == 16'h3120 || dut.u_mem.mem[16'h2FFE] == 16'h3121);
    check("Saved_SSP", dut.u_cpu.saved_ssp, 16'h3000);
    check("Saved_USP", dut.u_cpu.saved_usp, 16'hF000);
    check("KBSR ready cleared", {15'b0, dut.u_kbd.kb_ready}, 16'h0000);
    check("external writes", 16'(ext_writes), 16'd1);
    check("external write address", ext_last_addr, 16'hFFFE);
    check("external write data", ext_last_data, 16'h0041);

    // Every mechanism must have happened.
    begin
      state_e must [$] = '{S_ADD, S_AND, S_NOT, S_LEA, S_LD, S_LDR, S_LDI, S_ST,
                           S_STR, S_STI, S_BRTKN, S_JMP, S_JSRPC, S_JSRR, S_TRAP,
                           S_RTI, S_ILLOP, S_PRIV, S_INT, S_SAVEUSP, S_RESTUSP,
                           S_PUSHPC, S_POPPSR, S_VECPC};
      foreach (must[i]) begin
        check_true($sformatf("state %0d (%s) visited", must[i], must[i].name()),
                   visits[must[i]] > 0);
        $display("  state %2d %-10s visited %0d times", must[i], must[i].name(), visits[must[i]]);
      end
      check_true("branch not taken seen", br_not_taken > 0);
      check("exceptions: illegal opcode once", 16'(visits[S_ILLOP]), 16'd1);
      check("exceptions: privilege once", 16'(visits[S_PRIV]), 16'd1);
      check("interrupts: once", 16'(visits[S_INT]), 16'd1);
      $display("  branches not taken %0d, memory wait cycles %0d, cycles %0d",
               br_not_taken, mem_waits, cycles);
      if (EXPECT_WAITS) check_true("memory wait states seen", mem_waits > 0);
      else              check("no memory wait states", 16'(mem_waits), 16'd0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
