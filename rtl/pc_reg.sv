// pc_reg: program counter and its +4 incrementer.
//
// The PC holds the byte address of the instruction being executed. On every
// rising clock edge it loads pc_next (PC' in the course drawings); pc_plus4 is
// pc + 4, formed combinationally so that it settles within the same cycle,
// as in the add timing diagram where PC = 1000 gives PC+4 = 1004 before the
// next edge. The single-cycle datapath feeds pc_plus4 back as pc_next.
// Reset is this design's own choice: synchronous, active high, to RESET_PC.
module pc_reg #(
  parameter int          XLEN     = 32,
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [XLEN-1:0] pc_next,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] pc_plus4
);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC[XLEN-1:0];
    else     pc <= pc_next;
  end

  assign pc_plus4 = pc + XLEN'(4);

endmodule
