// lc3_io_decode: splits processor accesses between memory and device registers.
//
// When address bits 15:5 are all ones (xFFE0-xFFFF, 32 device registers) the
// access goes to an I/O device, otherwise to memory. Inside the I/O page the
// keyboard registers (KBSR, KBDR) go to the keyboard; every other device
// register address goes to the external device port. The enable of the chosen
// target follows the processor's `en`; its read data and ready return to the
// processor. Purely combinational.
module lc3_io_decode
  import lc3_pkg::*;
(
  input  word_t addr,
  input  logic  en,
  output logic  mem_en,
  output logic  kbd_en,
  output logic  ext_en,
  input  word_t mem_rdata,
  input  logic  mem_ready,
  input  word_t kbd_rdata,
  input  logic  kbd_ready,
  input  word_t ext_rdata,
  input  logic  ext_ready,
  output word_t rdata,
  output logic  ready
);

  logic is_io, is_kbd;

  always_comb begin
    is_io  = addr[15:5] == IO_PAGE;
    is_kbd = addr == KBSR_ADDR || addr == KBDR_ADDR;
    mem_en = en && !is_io;
    kbd_en = en && is_io && is_kbd;
    ext_en = en && is_io && !is_kbd;
    if (!is_io)      begin rdata = mem_rdata; ready = mem_ready; end
    else if (is_kbd) begin rdata = kbd_rdata; ready = kbd_ready; end
    else             begin rdata = ext_rdata; ready = ext_ready; end
  end

endmodule
