// reg_file_tb: self-checking test of the 32 x 8 register file.
// Checks that reset clears every register, then runs 400 random cycles of
// writes and reads at one address against a reference array, checking dout
// and the X pointer output {r27, r26} every cycle.
module reg_file_tb;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [4:0] addr = '0;
  logic [7:0] din = '0, dout;
  logic [15:0] x;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst_n(rst_n), .addr(addr), .din(din), .we(we), .dout(dout), .x(x));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
    for (int r = 0; r < 32; r++) begin
      model[r] = '0;
      addr = 5'(r); #1;
      checks++; if (dout !== 8'h00) begin failures++; $display("r%0d not cleared", r); end
    end
    repeat (400) begin
      we = 1'($urandom); addr = 5'($urandom); din = 8'($urandom);
      #1;
      checks++; if (dout !== model[addr]) begin failures++; $display("read r%0d=%h expected %h", addr, dout, model[addr]); end
      @(posedge clk);
      if (we) model[addr] = din;
      #1;
      checks++; if (x !== {model[27], model[26]}) begin failures++; $display("x=%h expected %h", x, {model[27], model[26]}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
