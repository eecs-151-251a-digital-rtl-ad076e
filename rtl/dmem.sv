// dmem: data memory.
//
// A word-organised, byte-addressed memory of WORDS 32-bit words. Reading is
// combinational: rdata is the whole word at addr / 4 (addr[1:0] ignored;
// picking a byte or halfword out of it is done by load_ext). Writing happens
// on the rising clock edge when memrw is MEM_WRITE, to the byte lanes set in
// wmask; wdata already carries the data on the right lanes (store_align).
// Asynchronous read and synchronous write follow the course; the byte mask
// and the size are this design's own choices.
module dmem
  import riscv_pkg::*;
#(
  parameter int WORDS = 1024,
  parameter int XLEN  = 32
) (
  input  logic              clk,
  input  logic [XLEN-1:0]   addr,
  input  mem_rw_e           memrw,
  input  logic [XLEN/8-1:0] wmask,
  input  logic [XLEN-1:0]   wdata,
  output logic [XLEN-1:0]   rdata
);

  localparam int AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   widx;

  assign widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (memrw == MEM_WRITE) begin
      for (int i = 0; i < XLEN/8; i++) begin
        if (wmask[i]) mem[widx][8*i +: 8] <= wdata[8*i +: 8];
      end
    end
  end

  assign rdata = mem[widx];

endmodule
