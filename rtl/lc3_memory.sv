// lc3_memory: the LC-3 main memory, 2^ADDR_W words of 16 bits.
//
// The processor holds `en` (its MIO_EN) with a stable address, write flag and
// data until `ready` (its R signal) is high. `ready` rises LATENCY cycles
// after the access starts (LATENCY = 1: in the first cycle). Reads are
// combinational from `addr` and valid whenever `ready` is high; a write
// happens on the rising edge at which `ready` is high, once per access. The
// array is not reset: its contents are whatever was loaded. The word size and
// the 16-bit address space follow the LC-3 memory map; the ready handshake
// and its latency are this design's choice.
module lc3_memory
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned LATENCY = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  word_t             wdata,
  output word_t             rdata,
  output logic              ready
);

  word_t mem [2**ADDR_W];
  logic [7:0] cnt;

  assign ready = en && (cnt == 8'(LATENCY - 1));
  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (rst || !en || ready) cnt <= '0;
    else                     cnt <= cnt + 8'd1;
  end

  always_ff @(posedge clk) begin
    if (ready && we) mem[addr] <= wdata;
  end

  initial assert (LATENCY >= 1 && LATENCY <= 256) else $error("LATENCY out of range");

endmodule
