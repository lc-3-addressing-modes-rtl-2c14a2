// lc3_psr: processor status register and branch-enable logic.
//
// Holds PSR[15] (privilege: 1 = user, 0 = supervisor), PSR[10:8] (priority
// of the running code) and the condition codes N, Z, P in PSR[2:0]; the
// other PSR bits read as zero. Updates, all on the rising clock edge:
//   ld_cc       : N/Z/P <- sign/zero of the bus value (result-writing instrs)
//   ld_psr      : PSR   <- bus (RTI pops the saved PSR)
//   set_super   : PSR[15] <- 0 (exception or interrupt entry)
//   ld_priority : PSR[10:8] <- `priority_in` (interrupt entry)
// `ben` is the branch condition of the instruction in `ir`:
// (IR[11] & N) | (IR[10] & Z) | (IR[9] & P). The reset value is a parameter.
module lc3_psr
  import lc3_pkg::*;
#(
  parameter word_t RESET_VALUE = PSR_RESET_DEFAULT
) (
  input  logic       clk,
  input  logic       rst,
  input  word_t      bus,
  input  logic       ld_cc,
  input  logic       ld_psr,
  input  logic       set_super,
  input  logic       ld_priority,
  input  logic [2:0] priority_in,
  input  word_t      ir,
  output word_t      psr,
  output logic       ben
);

  logic       priv;
  logic [2:0] prio;
  logic [2:0] nzp;    // {N, Z, P}

  always_ff @(posedge clk) begin
    if (rst) begin
      priv <= RESET_VALUE[15];
      prio <= RESET_VALUE[10:8];
      nzp  <= RESET_VALUE[2:0];
    end else begin
      if (ld_psr) begin
        priv <= bus[15];
        prio <= bus[10:8];
        nzp  <= bus[2:0];
      end
      if (ld_cc) nzp <= {bus[15], bus == '0, !bus[15] && bus != '0};
      if (set_super) priv <= 1'b0;
      if (ld_priority) prio <= priority_in;
    end
  end

  assign psr = {priv, 4'b0, prio, 5'b0, nzp};
  assign ben = |(ir[11:9] & nzp);

endmodule
