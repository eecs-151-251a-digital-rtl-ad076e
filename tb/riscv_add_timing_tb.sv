// riscv_add_timing_tb: the two-instruction add timing example on the full
// processor.
//
// Reproduces the classic single-cycle timing picture: add x1,x2,x3 at
// PC = 1000 followed by add x6,x7,x9 at PC = 1004. Four addi instructions
// before them (from RESET_PC = 984) give x2, x3, x7 and x9 values. The
// checks follow the waveform one clock period at a time: while PC = 1000
// the fetched instruction is add x1,x2,x3, the ALU shows Reg[2]+Reg[3] and
// Reg[1] still holds its old value; only the rising edge moves PC to 1004
// and writes Reg[1]; then the ALU shows Reg[7]+Reg[9] and Reg[6] takes it
// at the following edge. PC+4 is 1004 and then 1008. Each value is checked
// early and late in its cycle, to show nothing changes between edges.
module riscv_add_timing_tb;
  import rv_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0, pc, inst;
  logic        illegal;
  int checks = 0, failures = 0;
  logic [31:0] prog [6];
  logic [31:0] old_x1;

  riscv_top #(.RESET_PC(32'd984)) dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .pc, .inst, .illegal);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  // check the values of one clock period, just after its edge and just before the next
  task automatic period(logic [31:0] exp_pc, logic [31:0] exp_inst, logic [31:0] exp_alu,
                        int reg_idx, logic [31:0] reg_val);
    for (int t = 0; t < 2; t++) begin
      expect_eq("PC", pc, exp_pc);
      expect_eq("PC+4", dut.u_dp.pc_plus4, exp_pc + 32'd4);
      expect_eq("inst", inst, exp_inst);
      expect_eq("alu", dut.u_dp.alu_out, exp_alu);
      expect_eq($sformatf("Reg[%0d]", reg_idx), dut.u_dp.u_rf.regs[reg_idx], reg_val);
      if (t == 0) #7;
    end
  endtask

  initial begin
    prog[0] = enc_i(OPI, 12'd20,   5'd0, 3'b000, 5'd2);   // addi x2, x0, 20
    prog[1] = enc_i(OPI, 12'd22,   5'd0, 3'b000, 5'd3);   // addi x3, x0, 22
    prog[2] = enc_i(OPI, 12'hfff,  5'd0, 3'b000, 5'd7);   // addi x7, x0, -1
    prog[3] = enc_i(OPI, 12'h100,  5'd0, 3'b000, 5'd9);   // addi x9, x0, 256
    prog[4] = enc_r(7'b0, 5'd3, 5'd2, 3'b000, 5'd1);      // add x1, x2, x3   @1000
    prog[5] = enc_r(7'b0, 5'd9, 5'd7, 3'b000, 5'd6);      // add x6, x7, x9   @1004
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'd984 + 32'(4 * i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 1'b0;
    dut.u_dp.u_rf.regs[1] = 32'h0bad_0bad;   // the "???" before the write
    dut.u_dp.u_rf.regs[6] = 32'h0bad_0bad;
    old_x1 = 32'h0bad_0bad;
    @(posedge clk); #1;
    rst = 1'b0;
    repeat (4) begin @(posedge clk); #1; end
    checks++;
    if (pc !== 32'd1000) begin failures++; $display("FAIL did not reach 1000: %0d", pc); end
    // PC = 1000: add x1, x2, x3 ; alu = Reg[2] + Reg[3] ; Reg[1] still old
    period(32'd1000, prog[4], 32'd42, 1, old_x1);
    @(posedge clk); #1;
    // PC = 1004: add x6, x7, x9 ; Reg[1] = Reg[2] + Reg[3] from this edge on
    period(32'd1004, prog[5], 32'd255, 1, 32'd42);
    expect_eq("Reg[6] before its edge", dut.u_dp.u_rf.regs[6], 32'h0bad_0bad);
    @(posedge clk); #1;
    expect_eq("Reg[6] after its edge", dut.u_dp.u_rf.regs[6], 32'd255);
    expect_eq("PC 1008", pc, 32'd1008);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
