// store_align: byte-lane steering for stores.
//
// The data memory is written a word at a time with a byte-lane mask. For SW
// the register value goes out unchanged with all four lanes enabled. For SB
// the low byte of rs2 is copied onto every lane and only the lane addr[1:0]
// is enabled; for SH the low halfword is copied onto both halves and the
// half selected by addr[1] is enabled. The course builds SW only; this
// block is this design's way of carrying SB and SH from the instruction set
// table. Little-endian lanes, no misalignment trap. Purely combinational.
module store_align
  import riscv_pkg::*;
(
  input  logic [2:0]  funct3,
  input  logic [1:0]  addr_lo,
  input  logic [31:0] rs2,
  output logic [31:0] wdata,
  output logic [3:0]  wmask
);

  always_comb begin
    unique case (funct3[1:0])
      2'b00: begin  // SB
        wdata = {4{rs2[7:0]}};
        wmask = 4'b0001 << addr_lo;
      end
      2'b01: begin  // SH
        wdata = {2{rs2[15:0]}};
        wmask = addr_lo[1] ? 4'b1100 : 4'b0011;
      end
      default: begin  // SW
        wdata = rs2;
        wmask = 4'b1111;
      end
    endcase
  end

endmodule
