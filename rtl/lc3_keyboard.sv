// lc3_keyboard: keyboard device registers and their interrupt logic.
//
// KBSR (status): bit 15 = a character is waiting (read only), bit 14 =
// interrupt enable (read/write). KBDR (data): bits 7:0 hold the character.
// A pulse on `key_valid` stores `key_data` and sets KBSR[15]; reading KBDR
// clears it. `irq` = KBSR[15] & KBSR[14] asks the processor for an interrupt;
// the processor compares `irq_priority` (the PRIORITY parameter) with its own
// priority. Register accesses complete in one cycle (`ready` = `en`). The
// keyboard as an interrupt source and its vector x0180 are the LC-3's; the
// register addresses (KBSR xFFE0, KBDR xFFE2 inside the I/O page) and the
// priority default are this design's choice.
module lc3_keyboard
  import lc3_pkg::*;
#(
  parameter logic [2:0] PRIORITY = 3'd4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       key_valid,
  input  logic [7:0] key_data,
  input  logic       en,
  input  logic       we,
  input  word_t      addr,
  input  word_t      wdata,
  output word_t      rdata,
  output logic       ready,
  output logic       irq,
  output logic [2:0] irq_priority
);

  logic       kb_ready, kb_ie;
  logic [7:0] kb_data;
  logic       rd_kbdr, wr_kbsr;

  assign rd_kbdr = en && !we && addr == KBDR_ADDR;
  assign wr_kbsr = en &&  we && addr == KBSR_ADDR;

  always_ff @(posedge clk) begin
    if (rst) begin
      kb_ready <= 1'b0;
      kb_ie    <= 1'b0;
      kb_data  <= '0;
    end else begin
      if (wr_kbsr) kb_ie <= wdata[14];
      if (key_valid) begin
        kb_data  <= key_data;
        kb_ready <= 1'b1;
      end else if (rd_kbdr) begin
        kb_ready <= 1'b0;
      end
    end
  end

  always_comb begin
    if (addr == KBDR_ADDR) rdata = {8'h00, kb_data};
    else                   rdata = {kb_ready, kb_ie, 14'b0};
  end

  assign ready        = en;
  assign irq          = kb_ready && kb_ie;
  assign irq_priority = PRIORITY;

endmodule
