// tb_lc3_system_full: end-to-end test of the LC-3 computer at its defaults.
//
// The same program and checks as tb_lc3_system, with the system's parameters
// untouched (single-cycle memory, so no memory wait states occur).
module tb_lc3_system_full;
  import lc3_pkg::*;
  import lc3_asm_pkg::init_t, lc3_asm_pkg::test_program;

  localparam int  WATCHDOG     = 20000;
  localparam bit  EXPECT_WAITS = 0;

  logic clk, rst, key_valid;
  logic [7:0] key_data;
  logic io_en, io_we, io_ready;
  logic [4:0] io_addr;
  word_t io_wdata, io_rdata, pc, psr;
  state_e state;

  lc3_system dut (.*);

  `include "lc3_system_checks.svh"
endmodule
