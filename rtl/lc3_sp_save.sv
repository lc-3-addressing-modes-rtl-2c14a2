// lc3_sp_save: the R6 save/restore hardware of the LC-3.
//
// R6 is the stack pointer of whichever mode is running. On entry to the
// supervisor from user mode the user's R6 is kept in Saved_USP and R6 takes
// Saved_SSP; RTI back to user mode does the reverse. This block holds the
// two saved pointers and the SP multiplexer that feeds the bus:
//   SP_INC : R6 + 1 (pop)     SP_DEC : R6 - 1 (push)
//   SP_SSP : Saved_SSP        SP_USP : Saved_USP
// `r6` is the current R6, read through the register file's SR1 port.
// ld_saved_usp / ld_saved_ssp capture `r6` on the rising edge. Saved_SSP
// resets to a parameter (the top of the supervisor stack), Saved_USP to 0.
module lc3_sp_save
  import lc3_pkg::*;
#(
  parameter word_t SSP_RESET = SSP_RESET_DEFAULT
) (
  input  logic   clk,
  input  logic   rst,
  input  word_t  r6,
  input  spmux_e spmux,
  input  logic   ld_saved_usp,
  input  logic   ld_saved_ssp,
  output word_t  sp_out,
  output word_t  saved_usp,
  output word_t  saved_ssp
);

  always_ff @(posedge clk) begin
    if (rst) begin
      saved_usp <= '0;
      saved_ssp <= SSP_RESET;
    end else begin
      if (ld_saved_usp) saved_usp <= r6;
      if (ld_saved_ssp) saved_ssp <= r6;
    end
  end

  always_comb begin
    unique case (spmux)
      SP_INC:  sp_out = r6 + 16'd1;
      SP_DEC:  sp_out = r6 - 16'd1;
      SP_SSP:  sp_out = saved_ssp;
      SP_USP:  sp_out = saved_usp;
      default: sp_out = r6;
    endcase
  end

endmodule
