// riscv_control: the controller of the single-cycle core.
//
// A purely combinational decoder from the 32-bit instruction to the control
// word of the datapath: RegWEn, ImmSel, BSel, ALUSel, MemRW, WBSel and the
// load/store width (funct3). The values per instruction class are those the
// course drives for add/sub, addi, lw and sw, extended to the whole class:
//   R-type  (0110011): RegWEn=1, BSel=Reg[rs2], ALUSel from funct3 and inst[30]
//   I-arith (0010011): RegWEn=1, ImmSel=I, BSel=imm, ALUSel from funct3
//                      (inst[30] chooses SRAI over SRLI only)
//   loads   (0000011): RegWEn=1, ImmSel=I, BSel=imm, ALUSel=add, MemRW=Read,
//                      WBSel=mem
//   stores  (0100011): RegWEn=0, ImmSel=S, BSel=imm, ALUSel=add, MemRW=Write
// Anything else, including funct7/funct3 combinations the instruction set
// does not define, raises illegal and gets a control word that changes no
// state, so the core just moves on to pc+4; treating those as no-ops is this
// design's own choice.
module riscv_control
  import riscv_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl,
  output logic        illegal
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;
  alu_op_e    arith_op;

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct7 = inst[31:25];

  // ALU operation of an arithmetic instruction; inst[30] picks SUB and SRA
  always_comb begin
    unique case (funct3)
      F3_ADD:  arith_op = ALU_ADD;
      F3_SLL:  arith_op = ALU_SLL;
      F3_SLT:  arith_op = ALU_SLT;
      F3_SLTU: arith_op = ALU_SLTU;
      F3_XOR:  arith_op = ALU_XOR;
      F3_SR:   arith_op = inst[30] ? ALU_SRA : ALU_SRL;
      F3_OR:   arith_op = ALU_OR;
      default: arith_op = ALU_AND;  // F3_AND
    endcase
  end

  always_comb begin
    ctrl    = CTRL_NOP;
    illegal = 1'b0;
    ctrl.mem_f3 = funct3;
    unique case (opcode)
      OPC_OP: begin
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = BSEL_RS2;
        ctrl.wb_sel  = WBSEL_ALU;
        if (funct3 == F3_ADD && inst[30]) ctrl.alu_sel = ALU_SUB;
        else                              ctrl.alu_sel = arith_op;
        // funct7 is 0000000, or 0100000 for SUB and SRA only
        if (!(funct7 == 7'b0000000 ||
              (funct7 == 7'b0100000 && (funct3 == F3_ADD || funct3 == F3_SR))))
          illegal = 1'b1;
      end
      OPC_OP_IMM: begin
        ctrl.reg_wen = 1'b1;
        ctrl.imm_sel = IMM_I;
        ctrl.b_sel   = BSEL_IMM;
        ctrl.wb_sel  = WBSEL_ALU;
        ctrl.alu_sel = arith_op;  // ADDI ignores inst[30]: arith_op is ADD
        if (funct3 == F3_SLL && funct7 != 7'b0000000) illegal = 1'b1;
        if (funct3 == F3_SR && !(funct7 == 7'b0000000 || funct7 == 7'b0100000))
          illegal = 1'b1;
      end
      OPC_LOAD: begin
        ctrl.reg_wen = 1'b1;
        ctrl.imm_sel = IMM_I;
        ctrl.b_sel   = BSEL_IMM;
        ctrl.alu_sel = ALU_ADD;
        ctrl.mem_rw  = MEM_READ;
        ctrl.wb_sel  = WBSEL_MEM;
        if (!(funct3 inside {F3_B, F3_H, F3_W, F3_BU, F3_HU})) illegal = 1'b1;
      end
      OPC_STORE: begin
        ctrl.reg_wen = 1'b0;
        ctrl.imm_sel = IMM_S;
        ctrl.b_sel   = BSEL_IMM;
        ctrl.alu_sel = ALU_ADD;
        ctrl.mem_rw  = MEM_WRITE;
        ctrl.wb_sel  = WBSEL_ALU;  // don't care: nothing is written back
        if (!(funct3 inside {F3_B, F3_H, F3_W})) illegal = 1'b1;
      end
      default: illegal = 1'b1;
    endcase
    if (illegal) begin
      ctrl = CTRL_NOP;
      ctrl.mem_f3 = funct3;
    end
  end

endmodule
