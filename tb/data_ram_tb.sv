// data_ram_tb: self-checking test of the data memory.
// Writes a random byte to every address, reads all back through the
// combinational port, then performs 300 random read/write cycles against a
// reference array: a write must appear at the next clock edge and only when
// we is high.
module data_ram_tb;
  localparam int unsigned AW = 8;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] model [2**AW];
  int checks = 0, failures = 0;

  data_ram #(.AW(AW)) dut (.clk(clk), .addr(addr), .din(din), .we(we), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      we = 1'b1; addr = AW'(a); din = 8'($urandom); model[a] = din;
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a); #1;
      checks++; if (dout !== model[a]) begin failures++; $display("RAM[%0d]=%h expected %h", a, dout, model[a]); end
    end
    repeat (300) begin
      we = 1'($urandom); addr = AW'($urandom); din = 8'($urandom);
      #1;
      checks++; if (dout !== model[addr]) failures++;
      @(posedge clk);
      if (we) model[addr] = din;
      #1;
      checks++; if (dout !== model[addr]) begin failures++; $display("after edge RAM[%0d]=%h expected %h", addr, dout, model[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
