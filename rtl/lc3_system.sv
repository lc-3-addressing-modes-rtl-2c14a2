// lc3_system: an LC-3 computer, processor plus memory plus keyboard.
//
// The processor's memory port goes through the address decoder: addresses
// xFFE0-xFFFF (address bits 15:5 all ones) reach device registers, all
// others the 64K-word memory. The keyboard's registers KBSR/KBDR live in that
// device page and its interrupt request feeds the processor. The remaining
// device-register addresses are brought out on the `io_*` port for devices
// outside this design; `io_ready` must answer `io_en` (tie it to `io_en` for
// single-cycle devices). `key_valid`/`key_data` deliver keyboard characters.
// `pc`, `psr` and `state` are brought out for observation.
module lc3_system
  import lc3_pkg::*;
#(
  parameter word_t       PC_RESET    = PC_RESET_DEFAULT,
  parameter word_t       PSR_RESET   = PSR_RESET_DEFAULT,
  parameter word_t       SSP_RESET   = SSP_RESET_DEFAULT,
  parameter int unsigned MEM_LATENCY = 1,
  parameter logic [2:0]  KBD_PRIORITY = 3'd4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       key_valid,
  input  logic [7:0] key_data,
  output logic       io_en,
  output logic       io_we,
  output logic [4:0] io_addr,
  output word_t      io_wdata,
  input  word_t      io_rdata,
  input  logic       io_ready,
  output word_t      pc,
  output word_t      psr,
  output state_e     state
);

  logic  cpu_en, cpu_we, cpu_ready;
  word_t cpu_addr, cpu_wdata, cpu_rdata, ir;
  logic  mem_en, mem_ready, kbd_en, kbd_ready, irq;
  word_t mem_rdata, kbd_rdata;
  logic [2:0] irq_priority;

  lc3_cpu #(.PC_RESET(PC_RESET), .PSR_RESET(PSR_RESET), .SSP_RESET(SSP_RESET)) u_cpu (
    .clk, .rst,
    .mem_en(cpu_en), .mem_we(cpu_we), .mem_addr(cpu_addr), .mem_wdata(cpu_wdata),
    .mem_rdata(cpu_rdata), .mem_ready(cpu_ready),
    .irq, .irq_priority, .pc, .ir, .psr, .state
  );

  lc3_io_decode u_decode (
    .addr(cpu_addr), .en(cpu_en),
    .mem_en, .kbd_en, .ext_en(io_en),
    .mem_rdata, .mem_ready, .kbd_rdata, .kbd_ready,
    .ext_rdata(io_rdata), .ext_ready(io_ready),
    .rdata(cpu_rdata), .ready(cpu_ready)
  );

  lc3_memory #(.ADDR_W(16), .LATENCY(MEM_LATENCY)) u_mem (
    .clk, .rst, .en(mem_en), .we(cpu_we), .addr(cpu_addr), .wdata(cpu_wdata),
    .rdata(mem_rdata), .ready(mem_ready)
  );

  lc3_keyboard #(.PRIORITY(KBD_PRIORITY)) u_kbd (
    .clk, .rst, .key_valid, .key_data,
    .en(kbd_en), .we(cpu_we), .addr(cpu_addr), .wdata(cpu_wdata),
    .rdata(kbd_rdata), .ready(kbd_ready), .irq, .irq_priority
  );

  assign io_we    = cpu_we;
  assign io_addr  = cpu_addr[4:0];
  assign io_wdata = cpu_wdata;

endmodule
