// prog_mem: program memory (PM) holding 16-bit AVR instruction words.
//
// The fetch state reads INST = PM[PC] within one cycle, so the read port is
// combinational: dout follows addr. The memory as drawn has only addr and
// dout; the write port (we, waddr, wdata) is this design's own addition so that
// a program can be loaded from outside, for instance while the processor is
// held in reset. Writes take effect at the rising clock edge.
// Depth: 2**AW words; AW defaults to 8 because the PC is as wide as the 8-bit
// data path (the PC is loaded from the 8-bit VAL register on jumps).
module prog_mem #(
  parameter int unsigned AW = 8,
  parameter int unsigned IW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [IW-1:0] dout,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata
);

  logic [IW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign dout = mem[addr];

endmodule
