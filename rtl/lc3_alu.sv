// lc3_alu: the LC-3 arithmetic/logic unit.
//
// Purely combinational. `a` comes from the SR1 register port; `b` is either
// the SR2 port or the sign-extended imm5 field, chosen by IR[5] exactly as the
// ADD/AND instruction formats specify. Operations: ADD (16-bit two's
// complement, carry dropped), AND, NOT (of `a`) and PASSA, which hands SR1 to
// the bus for the store instructions.
module lc3_alu
  import lc3_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,       // SR1
  input  word_t   sr2,     // SR2
  input  word_t   ir,      // for IR[5] (mode) and IR[4:0] (imm5)
  output word_t   y
);

  word_t b;

  always_comb begin
    b = ir[5] ? {{11{ir[4]}}, ir[4:0]} : sr2;
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_AND:   y = a & b;
      ALU_NOT:   y = ~a;
      ALU_PASSA: y = a;
      default:   y = a;
    endcase
  end

endmodule
