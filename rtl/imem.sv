// imem: instruction memory.
//
// A word-organised memory of WORDS 32-bit instructions, read combinationally
// by byte address: rdata = mem[addr / 4] (addr[1:0] ignored, upper address
// bits beyond the memory size wrap). Reading needs no clock, as the course
// specifies for its state elements ("asynchronous read, synchronous write").
// The processor only reads it. A separate load port (prog_we, prog_addr,
// prog_data), written on the rising clock edge, lets the environment place a
// program before reset is released; that port and the size are this
// design's own choices.
module imem #(
  parameter int WORDS = 1024,
  parameter int XLEN  = 32
) (
  input  logic            clk,
  input  logic [XLEN-1:0] addr,
  output logic [XLEN-1:0] rdata,
  input  logic            prog_we,
  input  logic [XLEN-1:0] prog_addr,
  input  logic [XLEN-1:0] prog_data
);

  localparam int AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW+1:2]] <= prog_data;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
