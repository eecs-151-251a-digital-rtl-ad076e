// riscv_datapath_tb: self-checking test of the single-cycle datapath.
//
// The testbench plays controller and data memory. Each cycle it presents an
// instruction with a control word it sets itself per instruction class
// (written out here, not taken from the RTL controller), answers the data
// memory read combinationally and performs masked writes at the edge. The
// reference model rv_model executes the same instruction; before each edge
// the testbench compares the PC, the ALU result on dmem_addr and, for
// stores, the written byte lanes and mask. Register contents are checked
// by their effect on later ALU results and by a final read-out of all 31
// registers. One instruction must complete per cycle: the PC is checked to
// advance by exactly 4 on every edge.
module riscv_datapath_tb;
  import riscv_pkg::*;
  import rv_ref_pkg::*;

  localparam int WORDS = 64;
  localparam int NINST = 3000;

  logic        clk = 1'b0, rst;
  logic [31:0] pc, inst, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_wmask;
  ctrl_t       ctrl;
  logic [31:0] tbmem [WORDS];
  int checks = 0, failures = 0;
  int kinds [K_COUNT];
  rv_model m;

  riscv_datapath #(.XLEN(32), .RESET_PC(32'h0000_1000)) dut (
    .clk, .rst, .pc, .inst, .ctrl, .dmem_addr, .dmem_wdata, .dmem_wmask, .dmem_rdata);

  always #5 clk = ~clk;
  assign dmem_rdata = tbmem[(dmem_addr >> 2) % WORDS];

  always_ff @(posedge clk) begin
    if (!rst && ctrl.mem_rw == MEM_WRITE)
      for (int i = 0; i < 4; i++)
        if (dmem_wmask[i]) tbmem[(dmem_addr >> 2) % WORDS][8*i +: 8] <= dmem_wdata[8*i +: 8];
  end

  initial begin : watchdog
    repeat (NINST + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Control word per instruction class, as the datapath drawings set it
  function automatic ctrl_t tb_ctrl(logic [31:0] i);
    ctrl_t c;
    c = '{reg_wen: 1'b0, imm_sel: IMM_I, b_sel: 1'b0, alu_sel: ALU_ADD,
          mem_rw: MEM_READ, wb_sel: 1'b1, mem_f3: i[14:12]};
    case (i[6:0])
      7'b0110011, 7'b0010011: begin
        c.reg_wen = 1'b1;
        c.b_sel = (i[6:0] == 7'b0010011);
        case (i[14:12])
          3'b000: c.alu_sel = (i[6:0] == 7'b0110011 && i[30]) ? ALU_SUB : ALU_ADD;
          3'b001: c.alu_sel = ALU_SLL;
          3'b010: c.alu_sel = ALU_SLT;
          3'b011: c.alu_sel = ALU_SLTU;
          3'b100: c.alu_sel = ALU_XOR;
          3'b101: c.alu_sel = i[30] ? ALU_SRA : ALU_SRL;
          3'b110: c.alu_sel = ALU_OR;
          default: c.alu_sel = ALU_AND;
        endcase
      end
      7'b0000011: begin c.reg_wen = 1'b1; c.b_sel = 1'b1; c.wb_sel = 1'b0; end
      7'b0100011: begin c.imm_sel = IMM_S; c.b_sel = 1'b1; c.mem_rw = MEM_WRITE; end
      default: ;
    endcase
    return c;
  endfunction

  task automatic step(logic [31:0] i, logic [31:0] exp_pc);
    effect_t e;
    inst = i; ctrl = tb_ctrl(i);
    e = m.exec(i);
    kinds[e.kind]++;
    if (e.x0_write) kinds[K_X0_WRITE]++;
    #1;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("FAIL pc got=%h exp=%h", pc, exp_pc); end
    if (e.kind != K_ILLEGAL) begin
      checks++;
      if (dmem_addr !== e.alu) begin failures++; $display("FAIL alu inst=%h got=%h exp=%h", i, dmem_addr, e.alu); end
    end
    if (e.store) begin
      checks++;
      if (dmem_wmask !== e.wmask) begin failures++; $display("FAIL wmask inst=%h got=%b exp=%b", i, dmem_wmask, e.wmask); end
      for (int b = 0; b < 4; b++) if (e.wmask[b]) begin
        checks++;
        if (dmem_wdata[8*b +: 8] !== e.wlanes[8*b +: 8]) begin failures++; $display("FAIL lane %0d inst=%h", b, i); end
      end
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [31:0] p;
    m = new(WORDS);
    foreach (tbmem[w]) begin tbmem[w] = $urandom; m.mem[w] = tbmem[w]; end
    inst = 32'h0000_0013; ctrl = tb_ctrl(inst); rst = 1'b1;
    repeat (2) @(posedge clk);
    #1; checks++;
    if (pc !== 32'h1000) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 1'b0;
    p = 32'h1000;
    // give every register a known value
    for (int r = 1; r < 32; r++) begin step(enc_i(OPI, 12'($urandom), 5'd0, 3'b000, 5'(r)), p); p += 4; end
    // course examples: add x1,x2,x3 ; addi x15,x1,-50 ; sw x14,8(x2) ; lw x14,8(x2)
    step(enc_r(7'b0, 5'd3, 5'd2, 3'b000, 5'd1), p); p += 4;
    step(32'b111111001110_00001_000_01111_0010011, p); p += 4;
    step(enc_s(12'd8, 5'd14, 5'd2, 3'b010), p); p += 4;
    step(enc_i(LD, 12'd8, 5'd2, 3'b010, 5'd14), p); p += 4;
    for (int n = 0; n < NINST; n++) begin step(rand_inst(32), p); p += 4; end
    // read every register out through the ALU: add x0, xr, x0
    for (int r = 1; r < 32; r++) begin step(enc_r(7'b0, 5'd0, 5'(r), 3'b000, 5'd0), p); p += 4; end
    foreach (kinds[k]) begin
      checks++;
      if (kinds[k] == 0) begin failures++; $display("FAIL never exercised: %s", kind_e'(k)); end
    end
    $display("exercised: R-add %0d, R-sub %0d, R-other %0d, I-arith %0d, shift-imm %0d, lb %0d lh %0d lw %0d lbu %0d lhu %0d, sb %0d sh %0d sw %0d, x0 writes %0d, outside subset %0d",
             kinds[K_R_ADD], kinds[K_R_SUB], kinds[K_R_OTHER], kinds[K_I_ARITH], kinds[K_SHIFT_IMM],
             kinds[K_LB], kinds[K_LH], kinds[K_LW], kinds[K_LBU], kinds[K_LHU],
             kinds[K_SB], kinds[K_SH], kinds[K_SW], kinds[K_X0_WRITE], kinds[K_ILLEGAL]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
