// pc_reg_tb: self-checking test of the program counter.
//
// Checks the reset value, that pc_plus4 is pc + 4 within the same cycle,
// that the PC takes pc_next at each rising edge and holds it between edges,
// and reproduces the course's timing example (PC 1000 -> 1004, PC+4 1004 ->
// 1008). The feedback pc_next = pc_plus4 is closed here as in the datapath,
// and the number of edges needed to walk N instructions is counted.
module pc_reg_tb;
  logic        clk = 1'b0, rst;
  logic [31:0] pc_next, pc, pc_plus4;
  int checks = 0, failures = 0;
  logic feedback;

  pc_reg #(.XLEN(32), .RESET_PC(32'h0000_0100)) dut (.clk, .rst, .pc_next, .pc, .pc_plus4);

  always #5 clk = ~clk;
  logic [31:0] forced;
  assign pc_next = feedback ? pc_plus4 : forced;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    feedback = 1'b0; forced = 32'h0; rst = 1'b1;
    @(posedge clk); #1;
    expect_eq("reset pc", pc, 32'h100);
    expect_eq("reset pc+4", pc_plus4, 32'h104);
    rst = 1'b0;
    // timing example of the course: PC = 1000 then 1004
    forced = 32'd1000;
    @(posedge clk); #1;
    expect_eq("pc 1000", pc, 32'd1000);
    expect_eq("pc+4 1004", pc_plus4, 32'd1004);
    feedback = 1'b1;
    #3;  // no edge: PC must hold
    expect_eq("pc holds", pc, 32'd1000);
    @(posedge clk); #1;
    expect_eq("pc 1004", pc, 32'd1004);
    expect_eq("pc+4 1008", pc_plus4, 32'd1008);
    // one instruction per edge: 50 edges advance PC by 200
    repeat (50) @(posedge clk);
    #1;
    expect_eq("50 edges", pc, 32'd1004 + 32'd200);
    // wrap-around at the top of the address space
    feedback = 1'b0; forced = 32'hffff_fffc;
    @(posedge clk); #1;
    expect_eq("pc+4 wraps", pc_plus4, 32'h0);
    // random loads
    for (int i = 0; i < 100; i++) begin
      forced = $urandom;
      @(posedge clk); #1;
      expect_eq("load", pc, forced);
      expect_eq("plus4", pc_plus4, forced + 32'd4);
    end
    rst = 1'b1;
    @(posedge clk); #1;
    expect_eq("reset again", pc, 32'h100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
