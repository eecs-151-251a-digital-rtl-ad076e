// imem_tb: self-checking test of the instruction memory.
//
// Loads every word through the load port with a value derived from its
// index, then reads each back combinationally by byte address (checking
// that addr[1:0] is ignored and that the read needs no clock edge), and
// checks that a load-port write shows on the read port after one edge.
module imem_tb;
  localparam int WORDS = 256;
  logic        clk = 1'b0, prog_we;
  logic [31:0] addr, rdata, prog_addr, prog_data;
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS), .XLEN(32)) dut (.clk, .addr, .rdata, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pattern(int i);
    return 32'h9e37_79b9 * 32'(i + 1) ^ 32'(i);
  endfunction

  initial begin
    prog_we = 1'b0; prog_addr = 0; prog_data = 0; addr = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 32'(4 * i); prog_data = pattern(i);
    end
    @(negedge clk); prog_we = 1'b0;
    for (int i = 0; i < WORDS; i++) begin
      addr = 32'(4 * i) | 32'($urandom_range(0, 3));
      #1; checks++;
      if (rdata !== pattern(i)) begin failures++; $display("FAIL word %0d got=%h", i, rdata); end
    end
    // a write lands at the edge, and the read follows the address with no clock
    @(negedge clk);
    prog_we = 1'b1; prog_addr = 32'h40; prog_data = 32'h0010_0093; addr = 32'h40;
    #1; checks++;
    if (rdata !== pattern(16)) begin failures++; $display("FAIL written before edge"); end
    @(posedge clk); #1; prog_we = 1'b0;
    checks++;
    if (rdata !== 32'h0010_0093) begin failures++; $display("FAIL after edge got=%h", rdata); end
    addr = 32'h44; #1; checks++;
    if (rdata !== pattern(17)) begin failures++; $display("FAIL neighbour got=%h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
