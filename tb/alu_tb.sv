// alu_tb: self-checking test of the ALU.
//
// Drives every ALUSel value with directed corner operands (zero, all ones,
// sign boundaries, shift amounts 0 and 31) and then random operands, and
// compares the result with a reference written with plain 64-bit
// arithmetic, independent of the ALU's shared adder. The ALU is
// combinational, so the checks run on a free clock only to give the
// watchdog a time base.
module alu_tb;
  import riscv_pkg::*;

  logic [31:0] a, b, result;
  alu_op_e     sel;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  alu #(.XLEN(32)) dut (.a, .b, .alu_sel(sel), .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] x, logic [31:0] y);
    longint sx, sy;
    longint unsigned ux, uy;
    int sh;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    ux = {32'b0, x}; uy = {32'b0, y};
    sh = int'(y[4:0]);
    case (op)
      ALU_ADD:  return 32'(ux + uy);
      ALU_SUB:  return 32'(ux - uy);
      ALU_SLL:  return 32'(ux * (64'd1 << sh));
      ALU_SLT:  return (sx < sy) ? 32'd1 : 32'd0;
      ALU_SLTU: return (ux < uy) ? 32'd1 : 32'd0;
      ALU_XOR:  return x ^ y;
      ALU_SRL:  return 32'(ux / (64'd1 << sh));
      ALU_SRA:  return 32'(sx >>> sh);
      ALU_OR:   return x | y;
      ALU_AND:  return x & y;
      default:  return 32'hx;
    endcase
  endfunction

  task automatic check(alu_op_e op, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    a = x; b = y; sel = op;
    #1;
    exp = ref_alu(op, x, y);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got=%h exp=%h", op.name(), x, y, result, exp);
    end
  endtask

  logic [31:0] corners [8] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000,
                               32'h7fff_ffff, 32'h0000_001f, 32'hffff_ffce, 32'h1234_5678};

  initial begin
    alu_op_e op;
    for (int k = 0; k < 10; k++) begin
      op = alu_op_e'(k);
      foreach (corners[i]) foreach (corners[j]) check(op, corners[i], corners[j]);
      for (int n = 0; n < 300; n++) check(op, $urandom, $urandom);
    end
    // worked examples: add 2+3, sub 2-3, addi x15,x1,-50 with x1=100
    check(ALU_ADD, 32'd2, 32'd3);
    if (result != 32'd5) failures++;
    check(ALU_SUB, 32'd2, 32'd3);
    if (result != 32'hffff_ffff) failures++;
    check(ALU_ADD, 32'd100, 32'hffff_ffce);
    if (result != 32'd50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
