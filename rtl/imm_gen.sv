// imm_gen: immediate generator for the I and S instruction formats.
//
// Forms the 32-bit sign-extended immediate from inst[31:7] (input inst_hi,
// indexed like the instruction itself). Bits 31..11 copy inst[31] (sign extension) and
// bits 10..5 copy inst[30:25] in both formats; only the low five bits differ,
// so a 5-bit two-way mux selects inst[24:20] (I-type, ImmSel = I) or
// inst[11:7] (S-type, ImmSel = S). This is exactly the structure the course
// gives. Purely combinational. Most output bits are plain wires from the
// instruction (the sign copies and inst[30:25]); only the low five bits
// pass through logic, which is the point of the structure, not an omission.
module imm_gen
  import riscv_pkg::*;
(
  input  logic [31:7] inst_hi,
  input  imm_sel_e    imm_sel,
  output logic [31:0] imm
);

  logic [4:0] low5;

  always_comb begin
    unique case (imm_sel)
      IMM_S:   low5 = inst_hi[11:7];
      default: low5 = inst_hi[24:20];
    endcase
  end

  assign imm = {{21{inst_hi[31]}}, inst_hi[30:25], low5};

endmodule
