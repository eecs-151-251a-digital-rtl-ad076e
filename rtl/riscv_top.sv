// riscv_top: a single-cycle RV32I processor with its two memories.
//
// The processor executes one instruction per clock: register-register and
// register-immediate arithmetic (add, sub, sll, slt, sltu, xor, srl, sra,
// or, and and their immediate forms), loads (lb, lh, lw, lbu, lhu) and
// stores (sb, sh, sw). During a cycle the PC reads the instruction memory,
// the controller decodes the instruction into the control word, the
// datapath reads registers, computes in the ALU and reads the data memory;
// at the rising edge PC, register file and data memory are all updated.
// The organisation (datapath + controller + separate instruction and data
// memories, read combinationally, written on the clock edge) is the
// course's. This design's own choices: PC reset to RESET_PC, memory sizes,
// the instruction-memory load port, byte and halfword stores, and running
// every instruction outside this subset (branches, jumps, lui, auipc,
// fence, system) as a no-op that raises illegal and advances the PC by 4.
//
// Interface: hold rst high while loading the program through prog_*, then
// release it; the first instruction executed is the one at RESET_PC.
module riscv_top
  import riscv_pkg::*;
#(
  parameter int          XLEN       = 32,
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            prog_we,
  input  logic [XLEN-1:0] prog_addr,
  input  logic [XLEN-1:0] prog_data,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] inst,
  output logic            illegal
);

  ctrl_t             ctrl;
  logic [XLEN-1:0]   dmem_addr, dmem_wdata, dmem_rdata;
  logic [XLEN/8-1:0] dmem_wmask;

  imem #(.WORDS(IMEM_WORDS), .XLEN(XLEN)) u_imem (
    .clk,
    .addr     (pc),
    .rdata    (inst),
    .prog_we,
    .prog_addr,
    .prog_data
  );

  riscv_control u_ctrl (
    .inst,
    .ctrl,
    .illegal
  );

  riscv_datapath #(.XLEN(XLEN), .RESET_PC(RESET_PC)) u_dp (
    .clk,
    .rst,
    .pc,
    .inst,
    .ctrl,
    .dmem_addr,
    .dmem_wdata,
    .dmem_wmask,
    .dmem_rdata
  );

  dmem #(.WORDS(DMEM_WORDS), .XLEN(XLEN)) u_dmem (
    .clk,
    .addr  (dmem_addr),
    .memrw (rst ? MEM_READ : ctrl.mem_rw),
    .wmask (dmem_wmask),
    .wdata (dmem_wdata),
    .rdata (dmem_rdata)
  );

endmodule
