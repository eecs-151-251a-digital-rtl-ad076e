// riscv_datapath: the single-cycle datapath.
//
// Everything between the two memories except the controller. The PC
// addresses the instruction memory; the instruction's rs1 (inst[19:15]) and
// rs2 (inst[24:20]) fields read the register file; the immediate generator
// turns inst[31:7] into imm; the BSel mux (0 = Reg[rs2], 1 = imm) feeds the
// ALU's second operand, Reg[rs1] its first. The ALU result addresses the
// data memory and is one input of the WBSel mux (1 = alu, 0 = mem), whose
// output wb is written to Reg[rd] (inst[11:7]) when RegWEn is set. The PC
// loads pc+4. All of that follows the course drawings for add, addi, lw and
// sw. Added by this design for byte and halfword accesses: store_align puts
// Reg[rs2] on the right byte lanes with a write mask, and load_ext extracts
// and extends the loaded byte or halfword before the WBSel mux.
//
// Timing: one instruction per clock. The inputs inst, ctrl and dmem_rdata
// are combinational functions of this cycle's pc and dmem_addr; PC,
// register file and data memory update together on the rising edge.
module riscv_datapath
  import riscv_pkg::*;
#(
  parameter int          XLEN     = 32,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic              clk,
  input  logic              rst,
  // instruction memory
  output logic [XLEN-1:0]   pc,
  input  logic [XLEN-1:0]   inst,
  // controller
  input  ctrl_t             ctrl,
  // data memory (MemRW goes straight from the controller)
  output logic [XLEN-1:0]   dmem_addr,
  output logic [XLEN-1:0]   dmem_wdata,
  output logic [XLEN/8-1:0] dmem_wmask,
  input  logic [XLEN-1:0]   dmem_rdata
);

  logic [XLEN-1:0] pc_plus4;
  logic [XLEN-1:0] rs1_val, rs2_val;
  logic [XLEN-1:0] imm, alu_b, alu_out, mem_val, wb;

  pc_reg #(.XLEN(XLEN), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst,
    .pc_next (pc_plus4),
    .pc      (pc),
    .pc_plus4(pc_plus4)
  );

  regfile #(.XLEN(XLEN), .NREGS(32)) u_rf (
    .clk,
    .wen   (ctrl.reg_wen),
    .addr_d(inst[11:7]),
    .data_d(wb),
    .addr_a(inst[19:15]),
    .data_a(rs1_val),
    .addr_b(inst[24:20]),
    .data_b(rs2_val)
  );

  imm_gen u_imm (
    .inst_hi(inst[31:7]),
    .imm_sel(ctrl.imm_sel),
    .imm    (imm)
  );

  assign alu_b = (ctrl.b_sel == BSEL_IMM) ? imm : rs2_val;

  alu #(.XLEN(XLEN)) u_alu (
    .a      (rs1_val),
    .b      (alu_b),
    .alu_sel(ctrl.alu_sel),
    .result (alu_out)
  );

  assign dmem_addr = alu_out;

  store_align u_st (
    .funct3 (ctrl.mem_f3),
    .addr_lo(alu_out[1:0]),
    .rs2    (rs2_val),
    .wdata  (dmem_wdata),
    .wmask  (dmem_wmask)
  );

  load_ext u_ld (
    .funct3 (ctrl.mem_f3),
    .addr_lo(alu_out[1:0]),
    .word   (dmem_rdata),
    .data   (mem_val)
  );

  assign wb = (ctrl.wb_sel == WBSEL_ALU) ? alu_out : mem_val;

endmodule
