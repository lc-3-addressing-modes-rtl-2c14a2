// lc3_control: the multicycle controller of the LC-3.
//
// A Moore state machine whose states carry the LC-3 state numbers. Each state
// drives one control word (ctrl_t) into the datapath; the next state depends
// on the opcode (decode, state 32), BEN (BR), IR[11] (JSR/JSRR), PSR[15]
// (RTI, exception/interrupt entry, RTI return to user) and the memory ready
// signal (every memory state waits in place until `mem_ready`).
//
//   fetch       18 MAR<-PC, PC<-PC+1 (-> 49 if an interrupt is pending)
//               33 MDR<-M, 35 IR<-MDR, 32 decode (BEN latched)
//   operate     1 ADD, 5 AND, 9 NOT, 14 LEA   (DR written, CC set)
//   loads       2 LD, 6 LDR, 10 LDI (24, 26 indirect) -> 25 MDR<-M -> 27 DR<-MDR
//   stores      3 ST, 7 STR, 11 STI (29, 31 indirect) -> 23 MDR<-SR -> 16 M<-MDR
//   control     0 BR (22 taken), 12 JMP, 4 JSR (21 PC-relative, 20 register),
//               15 TRAP (28 R7<-PC, MDR<-M[trapvect8]; 30 PC<-MDR)
//   exceptions  13 illegal opcode (from decode), 44 RTI in user mode,
//               49 interrupt: MDR<-PSR, PSR[15]<-0 (49 also sets priority);
//               45 Saved_USP<-R6, R6<-Saved_SSP (if the code was user mode);
//               37/41 push PSR, 43/47/48 push PC-1, 50/52/54 PC<-M[vector]
//   RTI         8 MAR<-R6, 36/38/39 pop PC, 40/42/34 pop PSR,
//               59 Saved_SSP<-R6, R6<-Saved_USP (if returning to user mode)
//
// The state numbers and register transfers of the exception, interrupt and
// RTI sequences are the LC-3's. JSR/JSRR write R7 and PC in the same state
// (so JSRR R7 jumps to the old R7), and RTI in supervisor mode returns from
// state 34 straight to fetch: both are this design's reading.
module lc3_control
  import lc3_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_e opcode,
  input  logic    ir11,
  input  logic    ben,
  input  logic    psr15,
  input  logic    int_req,
  input  logic    mem_ready,
  output state_e  state,
  output ctrl_t   ctrl
);

  state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= next;
  end

  // Next state.
  always_comb begin
    next = S_FETCH;
    unique case (state)
      S_FETCH:    next = int_req ? S_INT : S_FETCHRD;
      S_FETCHRD:  next = mem_ready ? S_LDIR : S_FETCHRD;
      S_LDIR:     next = S_DECODE;
      S_DECODE:
        unique case (opcode)
          OP_BR:   next = S_BR;
          OP_ADD:  next = S_ADD;
          OP_LD:   next = S_LD;
          OP_ST:   next = S_ST;
          OP_JSR:  next = S_JSR;
          OP_AND:  next = S_AND;
          OP_LDR:  next = S_LDR;
          OP_STR:  next = S_STR;
          OP_RTI:  next = S_RTI;
          OP_NOT:  next = S_NOT;
          OP_LDI:  next = S_LDI;
          OP_STI:  next = S_STI;
          OP_JMP:  next = S_JMP;
          OP_RES:  next = S_ILLOP;
          OP_LEA:  next = S_LEA;
          OP_TRAP: next = S_TRAP;
          default: next = S_ILLOP;
        endcase
      S_ADD, S_AND, S_NOT, S_LEA: next = S_FETCH;
      S_LD, S_LDR:  next = S_LDRD;
      S_LDI:        next = S_LDIRD;
      S_LDIRD:      next = mem_ready ? S_LDIMAR : S_LDIRD;
      S_LDIMAR:     next = S_LDRD;
      S_LDRD:       next = mem_ready ? S_LDWB : S_LDRD;
      S_LDWB:       next = S_FETCH;
      S_ST, S_STR:  next = S_STMDR;
      S_STI:        next = S_STIRD;
      S_STIRD:      next = mem_ready ? S_STIMAR : S_STIRD;
      S_STIMAR:     next = S_STMDR;
      S_STMDR:      next = S_WRITE;
      S_WRITE:      next = mem_ready ? S_FETCH : S_WRITE;
      S_BR:         next = ben ? S_BRTKN : S_FETCH;
      S_BRTKN:      next = S_FETCH;
      S_JMP:        next = S_FETCH;
      S_JSR:        next = ir11 ? S_JSRPC : S_JSRR;
      S_JSRPC, S_JSRR: next = S_FETCH;
      S_TRAP:       next = S_TRAPRD;
      S_TRAPRD:     next = mem_ready ? S_TRAPPC : S_TRAPRD;
      S_TRAPPC:     next = S_FETCH;
      S_RTI:        next = psr15 ? S_PRIV : S_POPPCRD;
      S_POPPCRD:    next = mem_ready ? S_POPPC : S_POPPCRD;
      S_POPPC:      next = S_POPSP1;
      S_POPSP1:     next = S_POPPSRRD;
      S_POPPSRRD:   next = mem_ready ? S_POPPSR : S_POPPSRRD;
      S_POPPSR:     next = S_POPSP;
      S_POPSP:      next = psr15 ? S_RESTUSP : S_FETCH;
      S_RESTUSP:    next = S_FETCH;
      S_ILLOP, S_PRIV, S_INT: next = psr15 ? S_SAVEUSP : S_PUSHSP1;
      S_SAVEUSP:    next = S_PUSHSP1;
      S_PUSHSP1:    next = S_PUSHWR1;
      S_PUSHWR1:    next = mem_ready ? S_PUSHPC : S_PUSHWR1;
      S_PUSHPC:     next = S_PUSHSP2;
      S_PUSHSP2:    next = S_PUSHWR2;
      S_PUSHWR2:    next = mem_ready ? S_VECMAR : S_PUSHWR2;
      S_VECMAR:     next = S_VECRD;
      S_VECRD:      next = mem_ready ? S_VECPC : S_VECRD;
      S_VECPC:      next = S_FETCH;
      default:      next = S_FETCH;
    endcase
  end

  // Control word of the current state.
  always_comb begin
    ctrl = '0;
    ctrl.bus_sel = BUS_PC;
    ctrl.pcmux   = PC_INC;
    ctrl.drmux   = DR_IR11;
    ctrl.sr1mux  = SR1_IR8;
    ctrl.addr1   = A1_PC;
    ctrl.addr2   = A2_ZERO;
    ctrl.marmux  = MM_ADDER;
    ctrl.aluk    = ALU_PASSA;
    ctrl.spmux   = SP_INC;
    ctrl.cause   = CAUSE_ILLOP;
    unique case (state)
      S_FETCH: begin
        ctrl.bus_sel = BUS_PC; ctrl.ld_mar = 1'b1;
        ctrl.pcmux = PC_INC;   ctrl.ld_pc  = 1'b1;
      end
      S_FETCHRD, S_LDRD, S_LDIRD, S_STIRD, S_POPPCRD, S_POPPSRRD, S_VECRD: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = 1'b1;
      end
      S_LDIR: begin
        ctrl.bus_sel = BUS_MDR; ctrl.ld_ir = 1'b1;
      end
      S_DECODE: ctrl.ld_ben = 1'b1;
      S_ADD, S_AND, S_NOT: begin
        ctrl.aluk = (state == S_ADD) ? ALU_ADD : (state == S_AND) ? ALU_AND : ALU_NOT;
        ctrl.sr1mux = SR1_IR8; ctrl.bus_sel = BUS_ALU;
        ctrl.drmux = DR_IR11;  ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1;
      end
      S_LEA: begin
        ctrl.addr1 = A1_PC; ctrl.addr2 = A2_OFF9; ctrl.marmux = MM_ADDER;
        ctrl.bus_sel = BUS_MARMUX;
        ctrl.drmux = DR_IR11; ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1;
      end
      S_LD, S_LDI, S_ST, S_STI: begin
        ctrl.addr1 = A1_PC; ctrl.addr2 = A2_OFF9; ctrl.marmux = MM_ADDER;
        ctrl.bus_sel = BUS_MARMUX; ctrl.ld_mar = 1'b1;
      end
      S_LDR, S_STR: begin
        ctrl.sr1mux = SR1_IR8; ctrl.addr1 = A1_BASER; ctrl.addr2 = A2_OFF6;
        ctrl.marmux = MM_ADDER; ctrl.bus_sel = BUS_MARMUX; ctrl.ld_mar = 1'b1;
      end
      S_LDIMAR, S_STIMAR: begin
        ctrl.bus_sel = BUS_MDR; ctrl.ld_mar = 1'b1;
      end
      S_LDWB: begin
        ctrl.bus_sel = BUS_MDR; ctrl.drmux = DR_IR11;
        ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1;
      end
      S_STMDR: begin
        ctrl.sr1mux = SR1_IR11; ctrl.aluk = ALU_PASSA;
        ctrl.bus_sel = BUS_ALU; ctrl.ld_mdr = 1'b1;
      end
      S_WRITE, S_PUSHWR1, S_PUSHWR2: begin
        ctrl.mio_en = 1'b1; ctrl.r_w = 1'b1;
      end
      S_BR: ;
      S_BRTKN: begin
        ctrl.addr1 = A1_PC; ctrl.addr2 = A2_OFF9;
        ctrl.pcmux = PC_ADDER; ctrl.ld_pc = 1'b1;
      end
      S_JMP: begin
        ctrl.sr1mux = SR1_IR8; ctrl.addr1 = A1_BASER; ctrl.addr2 = A2_ZERO;
        ctrl.pcmux = PC_ADDER; ctrl.ld_pc = 1'b1;
      end
      S_JSR: ;
      S_JSRPC, S_JSRR: begin
        ctrl.bus_sel = BUS_PC; ctrl.drmux = DR_R7; ctrl.ld_reg = 1'b1;
        ctrl.sr1mux = SR1_IR8;
        ctrl.addr1 = (state == S_JSRPC) ? A1_PC : A1_BASER;
        ctrl.addr2 = (state == S_JSRPC) ? A2_OFF11 : A2_ZERO;
        ctrl.pcmux = PC_ADDER; ctrl.ld_pc = 1'b1;
      end
      S_TRAP: begin
        ctrl.marmux = MM_TRAPVECT; ctrl.bus_sel = BUS_MARMUX; ctrl.ld_mar = 1'b1;
      end
      S_TRAPRD: begin
        ctrl.mio_en = 1'b1; ctrl.ld_mdr = 1'b1;
        ctrl.bus_sel = BUS_PC; ctrl.drmux = DR_R7; ctrl.ld_reg = 1'b1;
      end
      S_TRAPPC, S_POPPC, S_VECPC: begin
        ctrl.bus_sel = BUS_MDR; ctrl.pcmux = PC_BUS; ctrl.ld_pc = 1'b1;
      end
      S_RTI: begin
        ctrl.sr1mux = SR1_R6; ctrl.aluk = ALU_PASSA;
        ctrl.bus_sel = BUS_ALU; ctrl.ld_mar = 1'b1;
      end
      S_POPSP1: begin
        ctrl.sr1mux = SR1_R6; ctrl.spmux = SP_INC; ctrl.bus_sel = BUS_SP;
        ctrl.ld_mar = 1'b1; ctrl.drmux = DR_R6; ctrl.ld_reg = 1'b1;
      end
      S_POPPSR: begin
        ctrl.bus_sel = BUS_MDR; ctrl.ld_psr = 1'b1;
      end
      S_POPSP: begin
        ctrl.sr1mux = SR1_R6; ctrl.spmux = SP_INC; ctrl.bus_sel = BUS_SP;
        ctrl.drmux = DR_R6; ctrl.ld_reg = 1'b1;
      end
      S_RESTUSP: begin
        ctrl.sr1mux = SR1_R6; ctrl.ld_saved_ssp = 1'b1;
        ctrl.spmux = SP_USP; ctrl.bus_sel = BUS_SP;
        ctrl.drmux = DR_R6; ctrl.ld_reg = 1'b1;
      end
      S_ILLOP, S_PRIV, S_INT: begin
        ctrl.cause = (state == S_ILLOP) ? CAUSE_ILLOP :
                     (state == S_PRIV)  ? CAUSE_PRIV  : CAUSE_KBD;
        ctrl.ld_vector = 1'b1;
        ctrl.bus_sel = BUS_PSR; ctrl.ld_mdr = 1'b1;
        ctrl.set_super = 1'b1;
        ctrl.ld_priority = (state == S_INT);
      end
      S_SAVEUSP: begin
        ctrl.sr1mux = SR1_R6; ctrl.ld_saved_usp = 1'b1;
        ctrl.spmux = SP_SSP; ctrl.bus_sel = BUS_SP;
        ctrl.drmux = DR_R6; ctrl.ld_reg = 1'b1;
      end
      S_PUSHSP1, S_PUSHSP2: begin
        ctrl.sr1mux = SR1_R6; ctrl.spmux = SP_DEC; ctrl.bus_sel = BUS_SP;
        ctrl.ld_mar = 1'b1; ctrl.drmux = DR_R6; ctrl.ld_reg = 1'b1;
      end
      S_PUSHPC: begin
        ctrl.bus_sel = BUS_PCM1; ctrl.ld_mdr = 1'b1;
      end
      S_VECMAR: begin
        ctrl.bus_sel = BUS_VECTOR; ctrl.ld_mar = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
