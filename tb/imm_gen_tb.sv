// imm_gen_tb: self-checking test of the I/S immediate generator.
//
// Builds I-type and S-type instructions from a chosen 12-bit offset (the
// fields placed by the instruction formats: I keeps imm[11:0] in
// inst[31:20], S splits imm[11:5] into inst[31:25] and imm[4:0] into
// inst[11:7]) with random other fields, and checks that the generator
// returns the sign-extended offset. Includes the course examples
// addi x15, x1, -50 and sw x14, 8(x2).
module imm_gen_tb;
  import riscv_pkg::*;
  logic [31:0] inst, imm;
  imm_sel_e    sel;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  imm_gen dut (.inst_hi(inst[31:7]), .imm_sel(sel), .imm);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_i(logic [11:0] off);
    logic [31:0] r = $urandom;
    inst = {off, r[19:0]}; sel = IMM_I;
    #1; checks++;
    if (imm !== 32'(signed'(off))) begin failures++; $display("FAIL I off=%h got=%h", off, imm); end
  endtask

  task automatic try_s(logic [11:0] off);
    logic [31:0] r = $urandom;
    inst = {off[11:5], r[24:12], off[4:0], r[6:0]}; sel = IMM_S;
    #1; checks++;
    if (imm !== 32'(signed'(off))) begin failures++; $display("FAIL S off=%h got=%h", off, imm); end
  endtask

  initial begin
    // addi x15, x1, -50 = 111111001110 00001 000 01111 0010011
    inst = 32'b111111001110_00001_000_01111_0010011; sel = IMM_I;
    #1; checks++;
    if (imm !== 32'hffff_ffce) begin failures++; $display("FAIL addi -50: %h", imm); end
    // sw x14, 8(x2): offset[11:5]=0 rs2=14 rs1=2 funct3=010 offset[4:0]=8 opcode 0100011
    inst = {7'd0, 5'd14, 5'd2, 3'b010, 5'd8, 7'b0100011}; sel = IMM_S;
    #1; checks++;
    if (imm !== 32'd8) begin failures++; $display("FAIL sw 8: %h", imm); end
    for (int k = 0; k < 4096; k++) begin
      try_i(12'(k));
      try_s(12'(k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
