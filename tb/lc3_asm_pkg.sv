// lc3_asm_pkg: instruction encoders and the test program for the LC-3 benches.
//
// Each encoder returns the 16-bit word of one LC-3 instruction; offsets are
// given in words and truncated to their field width (two's complement).
// `test_program` returns the memory image (address/data pairs) of a program
// that exercises every addressing mode, TRAP, both exceptions, a keyboard
// interrupt and the user/supervisor stack switch; its expected results are
// listed in tb_lc3_system.
package lc3_asm_pkg;

  typedef logic [15:0] word_t;
  typedef struct { word_t a; word_t d; } init_t;

  function automatic word_t ADDr(int dr, int s1, int s2); return {4'h1, 3'(dr), 3'(s1), 3'b000, 3'(s2)}; endfunction
  function automatic word_t ADDi(int dr, int s1, int imm); return {4'h1, 3'(dr), 3'(s1), 1'b1, 5'(imm)}; endfunction
  function automatic word_t ANDr(int dr, int s1, int s2); return {4'h5, 3'(dr), 3'(s1), 3'b000, 3'(s2)}; endfunction
  function automatic word_t ANDi(int dr, int s1, int imm); return {4'h5, 3'(dr), 3'(s1), 1'b1, 5'(imm)}; endfunction
  function automatic word_t NOT(int dr, int s1);           return {4'h9, 3'(dr), 3'(s1), 6'h3F}; endfunction
  function automatic word_t LEA(int dr, int off);          return {4'hE, 3'(dr), 9'(off)}; endfunction
  function automatic word_t LD(int dr, int off);           return {4'h2, 3'(dr), 9'(off)}; endfunction
  function automatic word_t LDI(int dr, int off);          return {4'hA, 3'(dr), 9'(off)}; endfunction
  function automatic word_t LDR(int dr, int b, int off);   return {4'h6, 3'(dr), 3'(b), 6'(off)}; endfunction
  function automatic word_t ST(int sr, int off);           return {4'h3, 3'(sr), 9'(off)}; endfunction
  function automatic word_t STI(int sr, int off);          return {4'hB, 3'(sr), 9'(off)}; endfunction
  function automatic word_t STR(int sr, int b, int off);   return {4'h7, 3'(sr), 3'(b), 6'(off)}; endfunction
  function automatic word_t BR(int nzp, int off);          return {4'h0, 3'(nzp), 9'(off)}; endfunction
  function automatic word_t JMP(int b);                    return {4'hC, 3'b000, 3'(b), 6'h00}; endfunction
  function automatic word_t JSR(int off);                  return {4'h4, 1'b1, 11'(off)}; endfunction
  function automatic word_t JSRR(int b);                   return {4'h4, 3'b000, 3'(b), 6'h00}; endfunction
  function automatic word_t TRAP(int v);                   return {4'hF, 4'h0, 8'(v)}; endfunction
  function automatic word_t RTI();                         return 16'h8000; endfunction
  function automatic word_t ILLEGAL();                     return 16'hD000; endfunction

  localparam int N = 3'b100, Z = 3'b010, P = 3'b001;

  function automatic void put(ref init_t img[$], input word_t a, input word_t d);
    init_t e;
    e.a = a; e.d = d;
    img.push_back(e);
  endfunction

  // Offset from the instruction at `at` to `target` (PC is at+1 when used).
  function automatic int off(word_t at, word_t target);
    return int'(target) - int'(at) - 1;
  endfunction

  function automatic void test_program(ref init_t img[$]);
    img.delete();
    // Vector table.
    put(img, 16'h0025, 16'h0400);   // HALT
    put(img, 16'h0030, 16'h0410);   // a service routine
    put(img, 16'h0100, 16'h0420);   // illegal opcode
    put(img, 16'h0101, 16'h0430);   // privilege violation
    put(img, 16'h0180, 16'h0440);   // keyboard
    // Operating-system routines.
    put(img, 16'h0400, BR(N|Z|P, -1));           // halt: spin
    put(img, 16'h0410, ADDi(5, 5, 8));
    put(img, 16'h0411, JMP(7));
    for (int h = 0; h < 2; h++) begin            // skip the offending instruction
      word_t b = (h == 0) ? 16'h0420 : 16'h0430;
      put(img, b + 0, LDR(0, 6, 0));
      put(img, b + 1, ADDi(0, 0, 1));
      put(img, b + 2, STR(0, 6, 0));
      put(img, b + 3, RTI());
    end
    put(img, 16'h0440, LDI(2, off(16'h0440, 16'h0444)));
    put(img, 16'h0441, STI(2, off(16'h0441, 16'h0445)));
    put(img, 16'h0442, RTI());
    put(img, 16'h0444, 16'hFFE2);                // KBDR
    put(img, 16'h0445, 16'h3141);                // FLAG
    // User program.
    put(img, 16'h3000, LD(6, off(16'h3000, 16'h3020)));
    put(img, 16'h3001, BR(N|Z|P, off(16'h3001, 16'h30F6)));
    put(img, 16'h3020, 16'hF000);                // stack pointer
    put(img, 16'h30F6, LEA(1, -3));              // R1 <- x30F4, the pointer
    put(img, 16'h30F7, ADDi(2, 1, 14));          // R2 <- x3102, the data address
    put(img, 16'h30F8, ST(2, -5));               // pointer <- x3102
    put(img, 16'h30F9, ANDi(2, 2, 0));
    put(img, 16'h30FA, ADDi(2, 2, 5));
    put(img, 16'h30FB, STR(2, 1, 14));           // data <- 5
    put(img, 16'h30FC, LDI(3, -9));              // R3 <- M[M[x30F4]] = 5
    put(img, 16'h30FD, BR(N|Z|P, off(16'h30FD, 16'h3110)));
    put(img, 16'h3110, NOT(4, 3));               // R4 <- xFFFA, N
    put(img, 16'h3111, BR(N, 1));                // taken
    put(img, 16'h3112, ADDi(5, 5, 1));           // skipped
    put(img, 16'h3113, BR(Z, 1));                // not taken
    put(img, 16'h3114, ADDi(5, 5, 2));           // R5 = 2
    put(img, 16'h3115, ADDr(0, 3, 4));           // R0 = xFFFF
    put(img, 16'h3116, ANDr(1, 0, 3));           // R1 = 5
    put(img, 16'h3117, STI(1, off(16'h3117, 16'h3140)));  // M[x3150] = 5
    put(img, 16'h3118, JSR(off(16'h3118, 16'h3130)));
    put(img, 16'h3119, TRAP(8'h30));
    put(img, 16'h311A, LEA(0, off(16'h311A, 16'h3138)));
    put(img, 16'h311B, JSRR(0));
    put(img, 16'h311C, ILLEGAL());
    put(img, 16'h311D, RTI());                   // user mode: privilege violation
    put(img, 16'h311E, LD(1, off(16'h311E, 16'h3142)));
    put(img, 16'h311F, STI(1, off(16'h311F, 16'h3143)));  // KBSR.IE <- 1
    put(img, 16'h3120, LD(4, off(16'h3120, 16'h3141)));   // wait for FLAG
    put(img, 16'h3121, BR(Z, -2));
    put(img, 16'h3122, STI(4, off(16'h3122, 16'h3144)));  // external device register
    put(img, 16'h3123, TRAP(8'h25));
    put(img, 16'h3130, ADDi(5, 5, 4));
    put(img, 16'h3131, JMP(7));
    put(img, 16'h3138, ADDi(5, 5, 15));
    put(img, 16'h3139, JMP(7));
    put(img, 16'h3140, 16'h3150);
    put(img, 16'h3141, 16'h0000);                // FLAG
    put(img, 16'h3142, 16'h4000);
    put(img, 16'h3143, 16'hFFE0);                // KBSR
    put(img, 16'h3144, 16'hFFFE);                // an external device register
  endfunction

endpackage
