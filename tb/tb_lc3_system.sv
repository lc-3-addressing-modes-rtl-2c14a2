// tb_lc3_system: end-to-end test of the LC-3 computer with a slow memory.
//
// Runs the program of lc3_asm_pkg (addressing modes, TRAP, illegal opcode,
// RTI in user mode, keyboard interrupt, stack switch, external device write)
// with a memory that needs 3 cycles per access, so every memory state of the
// controller also waits. Checks final registers, memory, PSR and the saved
// stack pointers, and that each mechanism occurred.
module tb_lc3_system;
  import lc3_pkg::*;
  import lc3_asm_pkg::init_t, lc3_asm_pkg::test_program;

  localparam int  WATCHDOG     = 20000;
  localparam bit  EXPECT_WAITS = 1;

  logic clk, rst, key_valid;
  logic [7:0] key_data;
  logic io_en, io_we, io_ready;
  logic [4:0] io_addr;
  word_t io_wdata, io_rdata, pc, psr;
  state_e state;

  lc3_system #(.MEM_LATENCY(3)) dut (.*);

  `include "lc3_system_checks.svh"
endmodule
