// lc3_addr_unit: effective-address generation for the LC-3 addressing modes.
//
// Combinational. ADDR1MUX picks the base (PC for PC-relative modes, the SR1
// register for base+offset and register-indirect modes); ADDR2MUX picks the
// sign-extended offset IR[5:0], IR[8:0], IR[10:0] or zero; one adder sums
// them. `adder` feeds the PC multiplexer (branches, JSR, JMP) and MARMUX.
// MARMUX selects between that sum and the zero-extended trapvect8 IR[7:0]
// that TRAP uses to address the trap vector table.
module lc3_addr_unit
  import lc3_pkg::*;
(
  input  word_t   ir,
  input  word_t   pc,
  input  word_t   base,     // SR1 register port
  input  addr1_e  addr1,
  input  addr2_e  addr2,
  input  marmux_e marmux,
  output word_t   adder,
  output word_t   marmux_out
);

  word_t op1, op2;

  always_comb begin
    op1 = (addr1 == A1_BASER) ? base : pc;
    unique case (addr2)
      A2_ZERO:  op2 = '0;
      A2_OFF6:  op2 = {{10{ir[5]}}, ir[5:0]};
      A2_OFF9:  op2 = {{7{ir[8]}},  ir[8:0]};
      A2_OFF11: op2 = {{5{ir[10]}}, ir[10:0]};
      default:  op2 = '0;
    endcase
    adder      = op1 + op2;
    marmux_out = (marmux == MM_TRAPVECT) ? {8'h00, ir[7:0]} : adder;
  end

endmodule
