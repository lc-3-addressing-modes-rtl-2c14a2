// lc3_vector: vector ROM and Vect_Reg for exceptions and interrupts.
//
// The cause of an exception or interrupt addresses a small ROM that yields
// the address of its entry in the vector table; `ld_vector` latches that
// address into Vect_Reg on the rising edge, and the controller later puts
// Vect_Reg on the bus to read the service-routine address (MAR <- Vect_Reg,
// MDR <- Mem, PC <- MDR). Exception vectors lie in x0100-x017F, interrupt
// vectors in x0180-x01FF. Contents: illegal opcode x0100 and keyboard
// interrupt x0180 as the LC-3 memory map assigns them; privilege violation
// x0101 is this design's choice of the next exception entry.
module lc3_vector
  import lc3_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  cause_e cause,
  input  logic   ld_vector,
  output word_t  vect_reg
);

  word_t rom_out;

  always_comb begin
    unique case (cause)
      CAUSE_ILLOP: rom_out = VEC_ILLOP;
      CAUSE_PRIV:  rom_out = VEC_PRIV;
      CAUSE_KBD:   rom_out = VEC_KBD;
      default:     rom_out = VEC_ILLOP;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)            vect_reg <= '0;
    else if (ld_vector) vect_reg <= rom_out;
  end

endmodule
