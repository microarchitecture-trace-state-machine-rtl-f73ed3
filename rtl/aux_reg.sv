// aux_reg: the auxiliary register of the datapath (a box with din, dout, we).
//
// Every named register of the processor (PC, INST, REG, REG2, OFF, VAL1, VAL2,
// ADDR, SREG, VAL) is one of these. On a rising clock edge with we high the
// register takes din; otherwise it keeps its value. dout is the stored value.
// A synchronous active-low reset clears it to RESET_VAL; the reset is a choice
// of this design, the register as drawn has no reset input.
// Timing: din is sampled at the clock edge, dout changes right after it.
module aux_reg #(
  parameter int unsigned        W         = 8,
  parameter logic [W-1:0]       RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= RESET_VAL;
    else if (we) dout <= din;
  end

endmodule
