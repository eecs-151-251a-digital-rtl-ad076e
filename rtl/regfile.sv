// regfile: the 32 x 32-bit integer register file Reg[x0..x31].
//
// Two combinational read ports give DataA = Reg[AddrA] (rs1) and
// DataB = Reg[AddrB] (rs2); one write port stores DataD into Reg[AddrD] (rd)
// on the rising clock edge when RegWEn (wen) is 1. Register x0 always reads
// as 0 and writes to it are dropped. A read of the register being written
// returns the old value until the edge. All of this follows the course; the
// registers have no reset (software writes them before use).
module regfile #(
  parameter int XLEN  = 32,
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     wen,
  input  logic [$clog2(NREGS)-1:0] addr_d,
  input  logic [XLEN-1:0]          data_d,
  input  logic [$clog2(NREGS)-1:0] addr_a,
  output logic [XLEN-1:0]          data_a,
  input  logic [$clog2(NREGS)-1:0] addr_b,
  output logic [XLEN-1:0]          data_b
);

  // Entry 0 exists but is never written and never read.
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wen && addr_d != '0) regs[addr_d] <= data_d;
  end

  assign data_a = (addr_a == '0) ? '0 : regs[addr_a];
  assign data_b = (addr_b == '0) ? '0 : regs[addr_b];

endmodule
