// prog_mem_tb: self-checking test of the program memory.
// Loads every word through the write port with a pattern computed from the
// address, then reads all of them back through the combinational read port
// (the value must be visible in the same cycle the address is applied), and
// checks that a later write changes only its own word.
module prog_mem_tb;
  localparam int unsigned AW = 8;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0, waddr = '0;
  logic [15:0] wdata = '0, dout;
  int checks = 0, failures = 0;

  prog_mem #(.AW(AW)) dut (.clk(clk), .addr(addr), .dout(dout), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(int a);
    return 16'(a * 40503 + 17);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = pat(a);
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a); #1;
      checks++;
      if (dout !== pat(a)) begin failures++; $display("PM[%0d]=%h expected %h", a, dout, pat(a)); end
    end
    we = 1'b1; waddr = 8'd7; wdata = 16'hE20D;
    @(posedge clk); #1; we = 1'b0;
    addr = 8'd7; #1;
    checks++; if (dout !== 16'hE20D) failures++;
    addr = 8'd8; #1;
    checks++; if (dout !== pat(8)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
