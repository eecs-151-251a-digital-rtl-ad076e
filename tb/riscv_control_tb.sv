// riscv_control_tb: self-checking test of the instruction decoder.
//
// Every implemented instruction of the RV32I table (10 register-register,
// 9 register-immediate, 5 loads, 3 stores) is encoded from its opcode,
// funct3 and funct7 with random register and immediate fields, and the
// control word is compared with the expected RegWEn, ImmSel, BSel, ALUSel,
// MemRW and WBSel written out per instruction below. Instructions outside
// the subset (lui, auipc, jal, jalr, branches, fence, ecall, csr) and
// undefined funct7/funct3 combinations must raise illegal with RegWEn = 0
// and MemRW = Read.
module riscv_control_tb;
  import riscv_pkg::*;
  logic [31:0] inst;
  ctrl_t       ctrl;
  logic        illegal;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  riscv_control dut (.inst, .ctrl, .illegal);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string      name;
    logic [6:0] opc;
    logic [2:0] f3;
    logic [6:0] f7;      // only for R-type and shift-immediate
    logic       use_f7;
    logic       wen;
    logic       imm_s;   // 1 = ImmSel S
    logic       bsel;    // 1 = immediate
    alu_op_e    alu;
    logic       write;   // MemRW = Write
    logic       wb_alu;  // WBSel = alu (ignored for stores)
  } row_t;

  row_t rows [27] = '{
    '{"add",  7'b0110011, 3'b000, 7'b0000000, 1, 1, 0, 0, ALU_ADD,  0, 1},
    '{"sub",  7'b0110011, 3'b000, 7'b0100000, 1, 1, 0, 0, ALU_SUB,  0, 1},
    '{"sll",  7'b0110011, 3'b001, 7'b0000000, 1, 1, 0, 0, ALU_SLL,  0, 1},
    '{"slt",  7'b0110011, 3'b010, 7'b0000000, 1, 1, 0, 0, ALU_SLT,  0, 1},
    '{"sltu", 7'b0110011, 3'b011, 7'b0000000, 1, 1, 0, 0, ALU_SLTU, 0, 1},
    '{"xor",  7'b0110011, 3'b100, 7'b0000000, 1, 1, 0, 0, ALU_XOR,  0, 1},
    '{"srl",  7'b0110011, 3'b101, 7'b0000000, 1, 1, 0, 0, ALU_SRL,  0, 1},
    '{"sra",  7'b0110011, 3'b101, 7'b0100000, 1, 1, 0, 0, ALU_SRA,  0, 1},
    '{"or",   7'b0110011, 3'b110, 7'b0000000, 1, 1, 0, 0, ALU_OR,   0, 1},
    '{"and",  7'b0110011, 3'b111, 7'b0000000, 1, 1, 0, 0, ALU_AND,  0, 1},
    '{"addi", 7'b0010011, 3'b000, 7'b0000000, 0, 1, 0, 1, ALU_ADD,  0, 1},
    '{"slti", 7'b0010011, 3'b010, 7'b0000000, 0, 1, 0, 1, ALU_SLT,  0, 1},
    '{"sltiu",7'b0010011, 3'b011, 7'b0000000, 0, 1, 0, 1, ALU_SLTU, 0, 1},
    '{"xori", 7'b0010011, 3'b100, 7'b0000000, 0, 1, 0, 1, ALU_XOR,  0, 1},
    '{"ori",  7'b0010011, 3'b110, 7'b0000000, 0, 1, 0, 1, ALU_OR,   0, 1},
    '{"andi", 7'b0010011, 3'b111, 7'b0000000, 0, 1, 0, 1, ALU_AND,  0, 1},
    '{"slli", 7'b0010011, 3'b001, 7'b0000000, 1, 1, 0, 1, ALU_SLL,  0, 1},
    '{"srli", 7'b0010011, 3'b101, 7'b0000000, 1, 1, 0, 1, ALU_SRL,  0, 1},
    '{"srai", 7'b0010011, 3'b101, 7'b0100000, 1, 1, 0, 1, ALU_SRA,  0, 1},
    '{"lb",   7'b0000011, 3'b000, 7'b0000000, 0, 1, 0, 1, ALU_ADD,  0, 0},
    '{"lh",   7'b0000011, 3'b001, 7'b0000000, 0, 1, 0, 1, ALU_ADD,  0, 0},
    '{"lw",   7'b0000011, 3'b010, 7'b0000000, 0, 1, 0, 1, ALU_ADD,  0, 0},
    '{"lbu",  7'b0000011, 3'b100, 7'b0000000, 0, 1, 0, 1, ALU_ADD,  0, 0},
    '{"lhu",  7'b0000011, 3'b101, 7'b0000000, 0, 1, 0, 1, ALU_ADD,  0, 0},
    '{"sb",   7'b0100011, 3'b000, 7'b0000000, 0, 0, 1, 1, ALU_ADD,  1, 0},
    '{"sh",   7'b0100011, 3'b001, 7'b0000000, 0, 0, 1, 1, ALU_ADD,  1, 0},
    '{"sw",   7'b0100011, 3'b010, 7'b0000000, 0, 0, 1, 1, ALU_ADD,  1, 0}
  };

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%b exp=%b inst=%h", what, got, exp, inst); end
  endtask

  initial begin
    logic [31:0] r;
    // Course example: addi x15, x1, -50 decodes as ImmSel=I, RegWEn=1, BSel=1, ALUSel=Add
    inst = 32'b111111001110_00001_000_01111_0010011;
    #1;
    expect_bit("addi-50 wen", ctrl.reg_wen, 1'b1);
    expect_bit("addi-50 bsel", ctrl.b_sel, 1'b1);
    expect_bit("addi-50 add", ctrl.alu_sel == ALU_ADD, 1'b1);
    for (int n = 0; n < 40; n++) begin
      foreach (rows[i]) begin
        r = $urandom;
        inst = r;
        inst[6:0] = rows[i].opc;
        inst[14:12] = rows[i].f3;
        if (rows[i].use_f7) inst[31:25] = rows[i].f7;
        else if (rows[i].opc == OPC_OP_IMM && rows[i].f3 == F3_ADD) inst[31:25] = r[31:25]; // addi: any imm
        #1;
        expect_bit({rows[i].name, " illegal"}, illegal, 1'b0);
        expect_bit({rows[i].name, " RegWEn"}, ctrl.reg_wen, rows[i].wen);
        if (rows[i].bsel) expect_bit({rows[i].name, " ImmSel"}, ctrl.imm_sel == IMM_S, rows[i].imm_s);
        expect_bit({rows[i].name, " BSel"}, ctrl.b_sel, rows[i].bsel);
        expect_bit({rows[i].name, " ALUSel"}, ctrl.alu_sel == rows[i].alu, 1'b1);
        expect_bit({rows[i].name, " MemRW"}, ctrl.mem_rw == MEM_WRITE, rows[i].write);
        if (rows[i].wen) expect_bit({rows[i].name, " WBSel"}, ctrl.wb_sel, rows[i].wb_alu);
        expect_bit({rows[i].name, " width"}, ctrl.mem_f3 == rows[i].f3, 1'b1);
      end
    end
    // Outside the subset: lui, auipc, jal, jalr, branch, fence, system, and bad encodings
    begin
      logic [31:0] bad [11];
      bad = '{32'h0000_0037, 32'h0000_0017, 32'h0000_006f, 32'h0000_0067, 32'h0000_0063,
              32'h0000_000f, 32'h0000_0073,
              32'h0200_00b3,   // funct7 0000001 on add (not in the table)
              32'h4000_10b3,   // funct7 0100000 on sll
              32'h0000_3083,   // load funct3 011
              32'h0000_30a3};  // store funct3 011
      for (int n = 0; n < 20; n++) foreach (bad[i]) begin
        inst = bad[i] | ($urandom & 32'h000f_8f80);  // random rd and rs1 fields
        #1;
        expect_bit("bad illegal", illegal, 1'b1);
        expect_bit("bad RegWEn", ctrl.reg_wen, 1'b0);
        expect_bit("bad MemRW", ctrl.mem_rw == MEM_WRITE, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
