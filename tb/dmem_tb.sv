// dmem_tb: self-checking test of the data memory.
//
// Keeps a shadow copy of the memory and applies random word and masked
// byte-lane writes, checking after each that the whole addressed word reads
// back as the shadow says. Also checks that MemRW = Read never writes and
// that a write is visible only after the rising edge.
module dmem_tb;
  import riscv_pkg::*;
  localparam int WORDS = 64;
  logic        clk = 1'b0;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  wmask;
  mem_rw_e     memrw;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS), .XLEN(32)) dut (.clk, .addr, .memrw, .wmask, .wdata, .rdata);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(int w, mem_rw_e rw, logic [3:0] m, logic [31:0] d);
    @(negedge clk);
    addr = 32'(4 * w) | 32'($urandom_range(0, 3)); memrw = rw; wmask = m; wdata = d;
    #1; checks++;
    if (rdata !== shadow[w]) begin failures++; $display("FAIL pre-edge w=%0d got=%h exp=%h", w, rdata, shadow[w]); end
    @(posedge clk);
    if (rw == MEM_WRITE)
      for (int b = 0; b < 4; b++) if (m[b]) shadow[w][8*b +: 8] = d[8*b +: 8];
    #1; checks++;
    if (rdata !== shadow[w]) begin failures++; $display("FAIL post-edge w=%0d got=%h exp=%h", w, rdata, shadow[w]); end
    memrw = MEM_READ;
  endtask

  initial begin
    memrw = MEM_READ; wmask = 0; wdata = 0; addr = 0;
    for (int w = 0; w < WORDS; w++) begin
      shadow[w] = 32'h0;
      @(negedge clk); addr = 32'(4 * w); memrw = MEM_WRITE; wmask = 4'hf; wdata = 32'h0;
      @(posedge clk); #1;
    end
    memrw = MEM_READ;
    for (int i = 0; i < 400; i++)
      access($urandom_range(0, WORDS - 1), mem_rw_e'($urandom_range(0, 1)), 4'($urandom), $urandom);
    // read with a full mask never writes
    access(5, MEM_READ, 4'hf, 32'hffff_ffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
