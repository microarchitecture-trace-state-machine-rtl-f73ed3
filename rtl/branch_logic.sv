// branch_logic: the condition logic in front of the OFF register.
//
// For a conditional branch the OFF register is loaded either with the
// branch offset k = INST[9:3] or with 0, so that the following VAL = PC + OFF
// and PC = PC + 1 steps either jump or fall through in the same five cycles.
// This block computes the select of that small multiplexer from the SREG
// flags and the branch instruction, and drives the multiplexer output,
// sign-extended to the width of OFF.
// Encoding (AVR): INST[2:0] names the SREG bit tested (0 = C, 1 = Z) and
// INST[10] the sense (0: branch if set, breq/brlo; 1: branch if clear,
// brne/brsh). Combinational.
module branch_logic #(
  parameter int unsigned OW = 12
) (
  input  logic [15:0]   inst,
  input  logic [7:0]    sreg,
  output logic          taken,
  output logic [OW-1:0] off
);

  always_comb begin
    taken = (sreg[inst[2:0]] != inst[10]);
    off   = taken ? {{(OW-7){inst[9]}}, inst[9:3]} : '0;
  end

endmodule
