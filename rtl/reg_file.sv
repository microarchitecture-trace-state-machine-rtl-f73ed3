// reg_file: the AVR register file (RF), 32 registers of 8 bits.
//
// A single address selects the register that is read (dout, combinational)
// and, with we high at a rising clock edge, written from din. The datapath
// picks the address with RF_sel: REG for reads of the first operand and for
// write-back, REG2 for the second operand. A second output, x, always shows
// the X pointer, r27:r26, which feeds the ADDR register for ld and st.
// All registers clear on the synchronous active-low reset (this design's
// choice, so that every register reads a defined value).
module reg_file #(
  parameter int unsigned NREG = 32,
  parameter int unsigned DW   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] addr,
  input  logic [DW-1:0]           din,
  input  logic                    we,
  output logic [DW-1:0]           dout,
  output logic [2*DW-1:0]         x
);

  localparam int unsigned XL = 26;  // X pointer low byte r26, high byte r27

  logic [DW-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we) begin
      regs[addr] <= din;
    end
  end

  assign dout = regs[addr];
  assign x    = {regs[XL+1], regs[XL]};

endmodule
