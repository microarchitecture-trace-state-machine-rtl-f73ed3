// data_ram: data memory (RAM) used by the ld and st instructions.
//
// One address port: dout = mem[addr] combinationally (state 10000 loads
// VAL = RAM[ADDR] in one cycle) and, when we is high at a rising clock edge,
// mem[addr] takes din (state 10001, RAM[ADDR] = VAL). The address comes from
// the 16-bit ADDR register (the X pointer); only its low AW bits select a
// word, so the memory repeats every 2**AW bytes. The depth is this design's
// choice; the memory content is not reset.
module data_ram #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  input  logic          we,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
