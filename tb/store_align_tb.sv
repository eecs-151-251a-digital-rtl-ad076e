// store_align_tb: self-checking test of store byte-lane steering.
//
// For random register values, each store width (SB, SH, SW) and each byte
// offset, merges wdata into a random old memory word under wmask and
// compares the merged word with the expected result of writing the low
// 1, 2 or 4 bytes of rs2 at that byte offset (little-endian).
module store_align_tb;
  import riscv_pkg::*;
  logic [2:0]  funct3;
  logic [1:0]  addr_lo;
  logic [31:0] rs2, wdata;
  logic [3:0]  wmask;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  store_align dut (.funct3, .addr_lo, .rs2, .wdata, .wmask);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] old, merged, exp;
    int nbytes, base;
    logic [2:0] f3s [3] = '{F3_B, F3_H, F3_W};
    for (int i = 0; i < 300; i++) begin
      rs2 = $urandom; old = $urandom;
      foreach (f3s[k]) for (int lo = 0; lo < 4; lo++) begin
        funct3 = f3s[k]; addr_lo = 2'(lo);
        #1;
        for (int b = 0; b < 4; b++) merged[8*b +: 8] = wmask[b] ? wdata[8*b +: 8] : old[8*b +: 8];
        nbytes = (k == 0) ? 1 : (k == 1) ? 2 : 4;
        base   = (k == 0) ? lo : (k == 1) ? (lo & 2) : 0;
        exp = old;
        for (int b = 0; b < nbytes; b++) exp[8*(base + b) +: 8] = rs2[8*b +: 8];
        checks++;
        if (merged !== exp) begin
          failures++;
          $display("FAIL f3=%b lo=%0d rs2=%h got=%h exp=%h", funct3, lo, rs2, merged, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
