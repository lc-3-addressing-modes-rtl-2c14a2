// lc3_pkg: types and constants shared by the LC-3 processor modules.
//
// Holds the opcode and controller-state encodings, the selector enums of the
// datapath multiplexers, the control-word struct that the controller drives
// into the datapath, and the fixed addresses of the memory map. The opcode
// numbers and the state numbers are those of the LC-3 (state 18 fetch, 32
// decode, 13/44/49 exception and interrupt entry, 8 RTI and so on); the
// device-register addresses inside the I/O page and the exception vector
// numbers other than illegal opcode are this design's own choice.
package lc3_pkg;

  typedef logic [15:0] word_t;

  // Instruction opcodes, IR[15:12].
  typedef enum logic [3:0] {
    OP_BR   = 4'd0,  OP_ADD = 4'd1,  OP_LD  = 4'd2,  OP_ST   = 4'd3,
    OP_JSR  = 4'd4,  OP_AND = 4'd5,  OP_LDR = 4'd6,  OP_STR  = 4'd7,
    OP_RTI  = 4'd8,  OP_NOT = 4'd9,  OP_LDI = 4'd10, OP_STI  = 4'd11,
    OP_JMP  = 4'd12, OP_RES = 4'd13, OP_LEA = 4'd14, OP_TRAP = 4'd15
  } opcode_e;

  // Controller states, numbered as in the LC-3 state diagram.
  typedef enum logic [5:0] {
    S_BR     = 6'd0,  S_ADD    = 6'd1,  S_LD     = 6'd2,  S_ST     = 6'd3,
    S_JSR    = 6'd4,  S_AND    = 6'd5,  S_LDR    = 6'd6,  S_STR    = 6'd7,
    S_RTI    = 6'd8,  S_NOT    = 6'd9,  S_LDI    = 6'd10, S_STI    = 6'd11,
    S_JMP    = 6'd12, S_ILLOP  = 6'd13, S_LEA    = 6'd14, S_TRAP   = 6'd15,
    S_WRITE  = 6'd16, S_FETCH  = 6'd18, S_JSRR   = 6'd20, S_JSRPC  = 6'd21,
    S_BRTKN  = 6'd22, S_STMDR  = 6'd23, S_LDIRD  = 6'd24, S_LDRD   = 6'd25,
    S_LDIMAR = 6'd26, S_LDWB   = 6'd27, S_TRAPRD = 6'd28, S_STIRD  = 6'd29,
    S_TRAPPC = 6'd30, S_STIMAR = 6'd31, S_DECODE = 6'd32, S_FETCHRD = 6'd33,
    S_POPSP  = 6'd34, S_LDIR   = 6'd35, S_POPPCRD = 6'd36, S_PUSHSP1 = 6'd37,
    S_POPPC  = 6'd38, S_POPSP1 = 6'd39, S_POPPSRRD = 6'd40, S_PUSHWR1 = 6'd41,
    S_POPPSR = 6'd42, S_PUSHPC = 6'd43, S_PRIV   = 6'd44, S_SAVEUSP = 6'd45,
    S_PUSHSP2 = 6'd47, S_PUSHWR2 = 6'd48, S_INT  = 6'd49, S_VECMAR = 6'd50,
    S_VECRD  = 6'd52, S_VECPC  = 6'd54, S_RESTUSP = 6'd59
  } state_e;

  // Source driven onto the processor bus.
  typedef enum logic [2:0] {
    BUS_PC, BUS_MARMUX, BUS_ALU, BUS_MDR, BUS_PCM1, BUS_SP, BUS_PSR, BUS_VECTOR
  } bus_sel_e;

  typedef enum logic [1:0] { PC_INC, PC_BUS, PC_ADDER } pcmux_e;
  typedef enum logic [1:0] { DR_IR11, DR_R7, DR_R6 } drmux_e;
  typedef enum logic [1:0] { SR1_IR11, SR1_IR8, SR1_R6 } sr1mux_e;
  typedef enum logic { A1_PC, A1_BASER } addr1_e;
  typedef enum logic [1:0] { A2_ZERO, A2_OFF6, A2_OFF9, A2_OFF11 } addr2_e;
  typedef enum logic { MM_TRAPVECT, MM_ADDER } marmux_e;
  typedef enum logic [1:0] { ALU_ADD, ALU_AND, ALU_NOT, ALU_PASSA } alu_op_e;
  typedef enum logic [1:0] { SP_INC, SP_DEC, SP_SSP, SP_USP } spmux_e;

  // Cause presented to the vector ROM.
  typedef enum logic [1:0] { CAUSE_ILLOP, CAUSE_PRIV, CAUSE_KBD } cause_e;

  // Control word: everything the controller tells the datapath in one cycle.
  typedef struct packed {
    logic      ld_mar;
    logic      ld_mdr;
    logic      ld_ir;
    logic      ld_ben;
    logic      ld_reg;
    logic      ld_cc;
    logic      ld_pc;
    logic      ld_psr;        // PSR[15], PSR[10:8], PSR[2:0] <- bus
    logic      set_super;     // PSR[15] <- 0
    logic      ld_priority;   // PSR[10:8] <- priority of the interrupt
    logic      ld_saved_ssp;
    logic      ld_saved_usp;
    logic      ld_vector;
    logic      mio_en;
    logic      r_w;           // 1 = write
    bus_sel_e  bus_sel;
    pcmux_e    pcmux;
    drmux_e    drmux;
    sr1mux_e   sr1mux;
    addr1_e    addr1;
    addr2_e    addr2;
    marmux_e   marmux;
    alu_op_e   aluk;
    spmux_e    spmux;
    cause_e    cause;
  } ctrl_t;

  // Memory map.
  localparam word_t PC_RESET_DEFAULT  = 16'h3000;  // start of user space
  localparam word_t PSR_RESET_DEFAULT = 16'h8002;  // user mode, priority 0, Z
  localparam word_t SSP_RESET_DEFAULT = 16'h3000;  // supervisor stack grows down from x2FFF
  localparam logic [10:0] IO_PAGE     = 11'h7FF;   // addrBus[15:5] all ones: xFFE0-xFFFF
  localparam word_t KBSR_ADDR         = 16'hFFE0;
  localparam word_t KBDR_ADDR         = 16'hFFE2;

  // Vector-table addresses the vector ROM holds.
  localparam word_t VEC_ILLOP = 16'h0100;
  localparam word_t VEC_PRIV  = 16'h0101;
  localparam word_t VEC_KBD   = 16'h0180;

endpackage
