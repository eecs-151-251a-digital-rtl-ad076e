// load_ext_tb: self-checking test of load byte/halfword extraction.
//
// For random memory words, every load width (LB, LH, LW, LBU, LHU) and every
// byte offset, compares the output with a reference that shifts the word
// right by 8 * offset and sign- or zero-extends with arithmetic on signed
// and unsigned integers.
module load_ext_tb;
  import riscv_pkg::*;
  logic [2:0]  funct3;
  logic [1:0]  addr_lo;
  logic [31:0] word, data;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  load_ext dut (.funct3, .addr_lo, .word, .data);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expected(logic [2:0] f3, logic [1:0] lo, logic [31:0] w);
    int unsigned sh;
    longint v;
    case (f3)
      F3_B:  begin sh = 8 * lo;              v = longint'(byte'(w >> sh)); end
      F3_BU: begin sh = 8 * lo;              v = longint'((w >> sh) & 32'hff); end
      F3_H:  begin sh = lo[1] ? 16 : 0;      v = longint'(shortint'(w >> sh)); end
      F3_HU: begin sh = lo[1] ? 16 : 0;      v = longint'((w >> sh) & 32'hffff); end
      default: v = longint'(w);
    endcase
    return 32'(v);
  endfunction

  initial begin
    logic [2:0] f3s [5] = '{F3_B, F3_H, F3_W, F3_BU, F3_HU};
    for (int i = 0; i < 300; i++) begin
      word = (i == 0) ? 32'h80ff_7f01 : (i == 1) ? 32'h7f80_8000 : $urandom;
      foreach (f3s[k]) for (int lo = 0; lo < 4; lo++) begin
        funct3 = f3s[k]; addr_lo = 2'(lo);
        #1; checks++;
        if (data !== expected(funct3, addr_lo, word)) begin
          failures++;
          $display("FAIL f3=%b lo=%0d word=%h got=%h exp=%h", funct3, lo, word, data, expected(funct3, addr_lo, word));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
