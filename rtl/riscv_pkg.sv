// riscv_pkg: constants and types shared by the single-cycle RV32I core.
//
// Holds the opcode and funct3 values of the instruction classes this core
// executes (register-register, register-immediate, loads, stores), the ALU
// operation select, and the control word that the controller hands to the
// datapath. The opcode and funct3 numbers are the RV32I encodings; the ALU
// select numbering and the MemRW polarity are this design's own choice.
// The BSel and WBSel polarities follow the datapath drawings of the course:
// BSel 0 picks Reg[rs2] and 1 the immediate, WBSel 0 picks the memory and 1
// the ALU result.
package riscv_pkg;

  // Major opcodes, inst[6:0]
  localparam logic [6:0] OPC_OP     = 7'b0110011;  // R-type arithmetic
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;  // I-type arithmetic
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;

  // funct3 of the arithmetic instructions
  localparam logic [2:0] F3_ADD  = 3'b000;  // ADD/SUB/ADDI
  localparam logic [2:0] F3_SLL  = 3'b001;
  localparam logic [2:0] F3_SLT  = 3'b010;
  localparam logic [2:0] F3_SLTU = 3'b011;
  localparam logic [2:0] F3_XOR  = 3'b100;
  localparam logic [2:0] F3_SR   = 3'b101;  // SRL/SRA
  localparam logic [2:0] F3_OR   = 3'b110;
  localparam logic [2:0] F3_AND  = 3'b111;

  // funct3 of loads and stores: width in bits [1:0], zero-extend in bit 2
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // ALUSel
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9
  } alu_op_e;

  // ImmSel: which instruction format the immediate is taken from
  typedef enum logic {
    IMM_I = 1'b0,
    IMM_S = 1'b1
  } imm_sel_e;

  // MemRW
  typedef enum logic {
    MEM_READ  = 1'b0,
    MEM_WRITE = 1'b1
  } mem_rw_e;

  // BSel: ALU operand B source
  localparam logic BSEL_RS2 = 1'b0;
  localparam logic BSEL_IMM = 1'b1;

  // WBSel: register write-back source
  localparam logic WBSEL_MEM = 1'b0;
  localparam logic WBSEL_ALU = 1'b1;

  // Control word, one per instruction, produced combinationally
  typedef struct packed {
    logic       reg_wen;  // RegWEn: 1 = write Reg[rd]
    imm_sel_e   imm_sel;  // ImmSel
    logic       b_sel;    // BSel
    alu_op_e    alu_sel;  // ALUSel
    mem_rw_e    mem_rw;   // MemRW
    logic       wb_sel;   // WBSel
    logic [2:0] mem_f3;   // load/store width and signedness (inst[14:12])
  } ctrl_t;

  // Control word of an instruction that changes no state
  localparam ctrl_t CTRL_NOP = '{
    reg_wen: 1'b0, imm_sel: IMM_I, b_sel: BSEL_RS2, alu_sel: ALU_ADD,
    mem_rw: MEM_READ, wb_sel: WBSEL_ALU, mem_f3: F3_W
  };

endpackage
