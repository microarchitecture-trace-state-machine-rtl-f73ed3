// aux_reg_tb: self-checking test of the write-enabled auxiliary register.
// Checks the synchronous reset value, then 200 random cycles of we/din against
// a reference copy kept in the testbench: the register must take din only
// when we is high and hold otherwise.
module aux_reg_tb;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [W-1:0] din = '0, dout, model;
  int checks = 0, failures = 0;

  aux_reg #(.W(W), .RESET_VAL(8'hA5)) dut (.clk(clk), .rst_n(rst_n), .we(we), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk);
    #1;
    checks++; if (dout !== 8'hA5) begin failures++; $display("reset value %h", dout); end
    rst_n = 1'b1;
    model = 8'hA5;
    repeat (200) begin
      we  = 1'($urandom);
      din = W'($urandom);
      @(posedge clk);
      if (we) model = din;
      #1;
      checks++;
      if (dout !== model) begin failures++; $display("dout %h expected %h", dout, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
