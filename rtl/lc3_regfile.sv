// lc3_regfile: the eight 16-bit general registers R0-R7 of the LC-3.
//
// Two combinational read ports (SR1, SR2) and one write port (DR) written on
// the rising clock edge when `we` is high. R6 serves as the stack pointer and
// R7 as the return-address register; nothing here treats them specially, the
// datapath steers them through its DR and SR1 selectors. All registers clear
// on the synchronous active-high reset (the reset value is this design's
// choice).
module lc3_regfile
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  logic [2:0] dr,
  input  word_t      wdata,
  input  logic [2:0] sr1,
  input  logic [2:0] sr2,
  output word_t      sr1_data,
  output word_t      sr2_data
);

  word_t regs [8];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else if (we) begin
      regs[dr] <= wdata;
    end
  end

  assign sr1_data = regs[sr1];
  assign sr2_data = regs[sr2];

endmodule
