// regfile_tb: self-checking test of the 32 x 32 register file.
//
// Compares both read ports against a shadow array over directed and random
// writes: x0 stays 0 whatever is written to it, RegWEn = 0 writes nothing,
// a write becomes visible only after the rising edge (reads are
// combinational, writes synchronous), and the two ports read independently.
module regfile_tb;
  logic        clk = 1'b0, wen;
  logic [4:0]  addr_d, addr_a, addr_b;
  logic [31:0] data_d, data_a, data_b;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile #(.XLEN(32), .NREGS(32)) dut (.clk, .wen, .addr_d, .data_d, .addr_a, .data_a, .addr_b, .data_b);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(logic [4:0] r, logic [31:0] v, logic en);
    @(negedge clk);
    wen = en; addr_d = r; data_d = v;
    @(posedge clk);
    if (en && r != 0) shadow[r] = v;
    #1 wen = 1'b0;
  endtask

  task automatic read_check(logic [4:0] ra, logic [4:0] rb);
    addr_a = ra; addr_b = rb;
    #1;
    checks += 2;
    if (data_a !== shadow[ra]) begin failures++; $display("FAIL A x%0d got=%h exp=%h", ra, data_a, shadow[ra]); end
    if (data_b !== shadow[rb]) begin failures++; $display("FAIL B x%0d got=%h exp=%h", rb, data_b, shadow[rb]); end
  endtask

  initial begin
    wen = 1'b0; addr_d = 0; data_d = 0; addr_a = 0; addr_b = 0;
    foreach (shadow[i]) shadow[i] = 32'h0;
    // fill every register with a distinct value (x0 write must be ignored)
    for (int r = 0; r < 32; r++) write(5'(r), 32'hA500_0000 + 32'(r) * 32'h1111, 1'b1);
    for (int r = 0; r < 32; r++) read_check(5'(r), 5'(31 - r));
    // x0 is always 0
    write(5'd0, 32'hdead_beef, 1'b1);
    read_check(5'd0, 5'd0);
    // RegWEn = 0 writes nothing
    write(5'd7, 32'h1234_5678, 1'b0);
    read_check(5'd7, 5'd7);
    // the new value appears only after the edge
    @(negedge clk);
    wen = 1'b1; addr_d = 5'd3; data_d = 32'hcafe_f00d; addr_a = 5'd3; addr_b = 5'd3;
    #1;
    checks++;
    if (data_a !== shadow[3]) begin failures++; $display("FAIL read-before-edge"); end
    @(posedge clk); shadow[3] = 32'hcafe_f00d; #1 wen = 1'b0;
    read_check(5'd3, 5'd3);
    // random traffic
    for (int i = 0; i < 400; i++) begin
      write(5'($urandom), $urandom, 1'($urandom));
      read_check(5'($urandom), 5'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
