// alu: the arithmetic unit of the datapath.
//
// Combinational. op = 0 adds, op = 1 subtracts: Q = A + B or Q = A - B,
// modulo 2**DW. Sreg_out is sregin with the carry flag C (bit 0) and the zero
// flag Z (bit 1) replaced by those of this operation; the other SREG bits pass
// through unchanged. For subtraction C is the borrow, set when B > A as
// unsigned numbers (so that brlo after cp/cpi means "lower"). Z is set when
// Q is zero. Only C and Z are produced because they are the only flags the
// branches of this processor test.
module alu
  import mcpu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         op,
  input  logic [7:0]   sregin,
  output logic [W-1:0] q,
  output logic [7:0]   sreg_out
);

  logic [W:0] wide;

  always_comb begin
    if (op == ALU_SUB) wide = {1'b0, a} - {1'b0, b};
    else               wide = {1'b0, a} + {1'b0, b};
    q                = wide[W-1:0];
    sreg_out         = sregin;
    sreg_out[SREG_C] = wide[W];
    sreg_out[SREG_Z] = (wide[W-1:0] == '0);
  end

endmodule
