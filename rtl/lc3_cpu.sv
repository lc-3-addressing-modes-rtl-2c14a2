// lc3_cpu: the LC-3 processor, a multicycle datapath with one shared bus.
//
// Registers PC, IR, MAR, MDR and BEN sit around a 16-bit bus whose source
// the controller selects each cycle (PC, MARMUX, ALU, MDR, PC-1, the SP
// multiplexer, PSR or Vect_Reg). Around it: the register file, the ALU, the
// address unit that forms every addressing mode's address (PC+offset9,
// BaseR+offset6, PC+offset11, BaseR, zero-extended trapvect8), the PSR, the
// R6 save/restore hardware and the vector unit, all steered by lc3_control.
//
// Memory port: `mem_en` (MIO_EN) and `mem_we` stay high, with `mem_addr` =
// MAR and `mem_wdata` = MDR, until `mem_ready`; MDR takes `mem_rdata` on the
// edge where a read completes. Interrupt port: `irq` with its `irq_priority`
// is taken at the next fetch (state 18) when that priority is above
// PSR[10:8]. With a memory that answers at once an instruction takes 5
// cycles (operate, JMP, BR not taken) to 9 (LDI, STI), RTI 11 or 12; an
// illegal opcode 13 or 14 cycles up to the first fetch of its handler and an
// interrupt 10 or 11 cycles from the fetch it replaces; each memory wait cycle
// adds one. Reset (synchronous, active high) clears the registers and
// starts fetching at PC_RESET in the mode given by PSR_RESET.
module lc3_cpu
  import lc3_pkg::*;
#(
  parameter word_t PC_RESET  = PC_RESET_DEFAULT,
  parameter word_t PSR_RESET = PSR_RESET_DEFAULT,
  parameter word_t SSP_RESET = SSP_RESET_DEFAULT
) (
  input  logic       clk,
  input  logic       rst,
  output logic       mem_en,
  output logic       mem_we,
  output word_t      mem_addr,
  output word_t      mem_wdata,
  input  word_t      mem_rdata,
  input  logic       mem_ready,
  input  logic       irq,
  input  logic [2:0] irq_priority,
  output word_t      pc,
  output word_t      ir,
  output word_t      psr,
  output state_e     state
);

  ctrl_t ctrl;
  word_t mar, mdr;
  logic  ben_q, ben;
  word_t bus;
  word_t sr1_data, sr2_data, alu_y, adder, marmux_out, sp_out, vect_reg;
  word_t saved_usp, saved_ssp;
  logic [2:0] dr, sr1;
  logic  int_req;

  // Register selectors.
  always_comb begin
    unique case (ctrl.drmux)
      DR_R7:   dr = 3'd7;
      DR_R6:   dr = 3'd6;
      default: dr = ir[11:9];
    endcase
    unique case (ctrl.sr1mux)
      SR1_IR11: sr1 = ir[11:9];
      SR1_R6:   sr1 = 3'd6;
      default:  sr1 = ir[8:6];
    endcase
  end

  lc3_regfile u_regfile (
    .clk, .rst, .we(ctrl.ld_reg), .dr, .wdata(bus),
    .sr1, .sr2(ir[2:0]), .sr1_data, .sr2_data
  );

  lc3_alu u_alu (.op(ctrl.aluk), .a(sr1_data), .sr2(sr2_data), .ir, .y(alu_y));

  lc3_addr_unit u_addr (
    .ir, .pc, .base(sr1_data), .addr1(ctrl.addr1), .addr2(ctrl.addr2),
    .marmux(ctrl.marmux), .adder, .marmux_out
  );

  lc3_psr #(.RESET_VALUE(PSR_RESET)) u_psr (
    .clk, .rst, .bus, .ld_cc(ctrl.ld_cc), .ld_psr(ctrl.ld_psr),
    .set_super(ctrl.set_super), .ld_priority(ctrl.ld_priority),
    .priority_in(irq_priority), .ir, .psr, .ben
  );

  lc3_sp_save #(.SSP_RESET(SSP_RESET)) u_sp (
    .clk, .rst, .r6(sr1_data), .spmux(ctrl.spmux),
    .ld_saved_usp(ctrl.ld_saved_usp), .ld_saved_ssp(ctrl.ld_saved_ssp),
    .sp_out, .saved_usp, .saved_ssp
  );

  lc3_vector u_vector (.clk, .rst, .cause(ctrl.cause), .ld_vector(ctrl.ld_vector), .vect_reg);

  assign int_req = irq && (irq_priority > psr[10:8]);

  lc3_control u_ctrl (
    .clk, .rst, .opcode(opcode_e'(ir[15:12])), .ir11(ir[11]), .ben(ben_q),
    .psr15(psr[15]), .int_req, .mem_ready, .state, .ctrl
  );

  // The bus.
  always_comb begin
    unique case (ctrl.bus_sel)
      BUS_PC:     bus = pc;
      BUS_MARMUX: bus = marmux_out;
      BUS_ALU:    bus = alu_y;
      BUS_MDR:    bus = mdr;
      BUS_PCM1:   bus = pc - 16'd1;
      BUS_SP:     bus = sp_out;
      BUS_PSR:    bus = psr;
      BUS_VECTOR: bus = vect_reg;
      default:    bus = pc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= PC_RESET;
      ir    <= '0;
      mar   <= '0;
      mdr   <= '0;
      ben_q <= 1'b0;
    end else begin
      if (ctrl.ld_pc) begin
        unique case (ctrl.pcmux)
          PC_BUS:   pc <= bus;
          PC_ADDER: pc <= adder;
          default:  pc <= pc + 16'd1;
        endcase
      end
      if (ctrl.ld_ir)  ir    <= bus;
      if (ctrl.ld_mar) mar   <= bus;
      if (ctrl.ld_ben) ben_q <= ben;
      if (ctrl.ld_mdr) begin
        if (!ctrl.mio_en)   mdr <= bus;
        else if (mem_ready) mdr <= mem_rdata;
      end
    end
  end

  assign mem_en    = ctrl.mio_en;
  assign mem_we    = ctrl.r_w;
  assign mem_addr  = mar;
  assign mem_wdata = mdr;

  // A memory access holds its address and direction until it completes.
  property p_hold;
    @(posedge clk) disable iff (rst) (mem_en && !mem_ready) |=> (mem_en && $stable(mem_addr) && $stable(mem_we));
  endproperty
  a_hold: assert property (p_hold);

endmodule
