// riscv_top_tb: end-to-end test of the processor with its memories.
//
// Runs at the default parameters (1024-word instruction and data memories).
// With reset held, the program is written through the load port: 31
// addi instructions give every register a value, then the course's worked
// examples (add x1,x2,x3; addi x15,x1,-50; sw x14,8(x2); lw x14,8(x2)),
// then random register-register, register-immediate, load and store
// instructions, plus a few instructions outside the implemented subset,
// until the instruction memory is full. The data memory starts from a
// known random image. After reset the processor runs one instruction per
// clock; the reference model rv_model runs the same program. Each cycle
// the PC, the fetched instruction, the illegal flag and the ALU result are
// compared; at the end the whole register file and data memory are, and
// the cycle count must equal the instruction count. Every instruction kind
// (add, sub, other R-type, immediate arithmetic and shifts, each load and
// store width, a write to x0, an instruction outside the subset) must have
// occurred at least once.
module riscv_top_tb;
  import riscv_pkg::*;
  import rv_ref_pkg::*;

  localparam int IW = 1024;   // default IMEM_WORDS
  localparam int DW = 1024;   // default DMEM_WORDS

  logic        clk = 1'b0, rst = 1'b1;
  logic        prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0;
  logic [31:0] pc, inst;
  logic        illegal;
  logic [31:0] prog [IW];
  int checks = 0, failures = 0;
  int kinds [K_COUNT];
  int cycles = 0;
  rv_model m;

  riscv_top dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .pc, .inst, .illegal);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3 * IW + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    int n;
    effect_t e;
    m = new(DW);
    // program
    n = 0;
    for (int r = 1; r < 32; r++) prog[n++] = enc_i(OPI, 12'($urandom), 5'd0, 3'b000, 5'(r));
    prog[n++] = enc_r(7'b0, 5'd3, 5'd2, 3'b000, 5'd1);          // add x1, x2, x3
    prog[n++] = 32'b111111001110_00001_000_01111_0010011;        // addi x15, x1, -50
    prog[n++] = enc_s(12'd8, 5'd14, 5'd2, 3'b010);               // sw x14, 8(x2)
    prog[n++] = enc_i(LD, 12'd8, 5'd2, 3'b010, 5'd14);           // lw x14, 8(x2)
    while (n < IW) prog[n++] = rand_inst(32);
    // data memory image, same in the model
    for (int w = 0; w < DW; w++) begin
      m.mem[w] = $urandom;
      dut.u_dmem.mem[w] = m.mem[w];
    end
    // load the program with reset held
    for (int i = 0; i < IW; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'(4 * i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    @(posedge clk); #1;
    expect_eq("reset pc", pc, 32'h0);
    rst = 1'b0;
    // run: one instruction per clock
    for (int i = 0; i < IW; i++) begin
      expect_eq("pc", pc, 32'(4 * i));
      expect_eq("inst", inst, prog[i]);
      e = m.exec(prog[i]);
      kinds[e.kind]++;
      if (e.x0_write) kinds[K_X0_WRITE]++;
      checks++;
      if (illegal !== (e.kind == K_ILLEGAL)) begin failures++; $display("FAIL illegal flag at %0d", i); end
      if (e.kind != K_ILLEGAL) expect_eq("alu", dut.dmem_addr, e.alu);
      @(posedge clk); #1;
      cycles++;
    end
    // one instruction per cycle
    checks++;
    if (cycles != IW || pc !== 32'(4 * IW)) begin
      failures++; $display("FAIL %0d instructions took %0d cycles, pc=%h", IW, cycles, pc);
    end
    $display("executed %0d instructions in %0d cycles", IW, cycles);
    // architectural state
    for (int r = 1; r < 32; r++) expect_eq($sformatf("x%0d", r), dut.u_dp.u_rf.regs[r], m.regs[r]);
    for (int w = 0; w < DW; w++) expect_eq($sformatf("mem[%0d]", w), dut.u_dmem.mem[w], m.mem[w]);
    // the course's worked example: x15 = x1 - 50 right after it executed is covered by the alu check
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
