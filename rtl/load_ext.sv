// load_ext: byte and halfword extraction for loads.
//
// The data memory returns the whole 32-bit word holding the address. For
// LW the word passes unchanged. For LB/LBU the byte at addr[1:0] and for
// LH/LHU the halfword at addr[1] is moved to the bottom and sign-extended
// (LB, LH) or zero-extended (LBU, LHU), as funct3 says. The course names
// this circuit ("extract the correct byte/halfword ... and sign- or
// zero-extend"); little-endian lane order and ignoring misalignment (no
// trap) are this design's choices. Purely combinational.
module load_ext
  import riscv_pkg::*;
(
  input  logic [2:0]  funct3,
  input  logic [1:0]  addr_lo,
  input  logic [31:0] word,
  output logic [31:0] data
);

  logic [7:0]  byte_v;
  logic [15:0] half_v;

  assign byte_v = word[8*addr_lo +: 8];
  assign half_v = addr_lo[1] ? word[31:16] : word[15:0];

  always_comb begin
    unique case (funct3)
      F3_B:    data = {{24{byte_v[7]}}, byte_v};
      F3_BU:   data = {24'b0, byte_v};
      F3_H:    data = {{16{half_v[15]}}, half_v};
      F3_HU:   data = {16'b0, half_v};
      default: data = word;  // F3_W
    endcase
  end

endmodule
