// alu: the 32-bit arithmetic-logic unit of the single-cycle core.
//
// Computes one of the ten RV32I integer operations on operands a (Reg[rs1])
// and b (Reg[rs2] or the immediate), chosen by ALUSel: add, sub, shift left,
// set-less-than signed and unsigned, xor, logical and arithmetic shift right,
// or, and. Shift amounts are b[4:0]. The course fixes the operation set
// (decoded from funct3/funct7, inst[30] picking sub over add); the inner
// structure here, one shared adder/subtractor and a case over ALUSel, is
// this design's own. Purely combinational.
module alu
  import riscv_pkg::*;
#(
  parameter int XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         alu_sel,
  output logic [XLEN-1:0] result
);

  localparam int SW = $clog2(XLEN);

  logic            sub;
  logic [XLEN-1:0] sum;
  logic [SW-1:0]   shamt;

  // One adder serves ADD and SUB (b inverted, carry in 1)
  assign sub   = (alu_sel == ALU_SUB);
  assign sum   = a + (sub ? ~b : b) + XLEN'(sub);
  assign shamt = b[SW-1:0];

  always_comb begin
    unique case (alu_sel)
      ALU_ADD,
      ALU_SUB:  result = sum;
      ALU_SLL:  result = a << shamt;
      ALU_SLT:  result = XLEN'($signed(a) < $signed(b));
      ALU_SLTU: result = XLEN'(a < b);
      ALU_XOR:  result = a ^ b;
      ALU_SRL:  result = a >> shamt;
      ALU_SRA:  result = XLEN'($signed(a) >>> shamt);
      ALU_OR:   result = a | b;
      ALU_AND:  result = a & b;
      default:  result = sum;
    endcase
  end

endmodule
