// alu_tb: self-checking test of the ALU.
// For every pair of 8-bit operands and both operations it compares Q, the
// carry/borrow flag (SREG bit 0) and the zero flag (bit 1) with values
// computed here in integer arithmetic, and checks that the other six SREG
// bits pass through from sregin. The sweep is exhaustive (131072 cases).
module alu_tb;
  import mcpu_pkg::*;
  logic [7:0] a, b, q, sregin, sreg_out;
  logic op;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .sregin(sregin), .q(q), .sreg_out(sreg_out));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic c, z;
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        for (int io = 0; io < 2; io++) begin
          a = 8'(ia); b = 8'(ib); op = 1'(io); sregin = 8'($urandom);
          #1;
          r = (io == 0) ? ia + ib : ia - ib;
          c = (io == 0) ? (r > 255) : (ib > ia);
          z = ((r & 255) == 0);
          checks++;
          if (q !== 8'(r) || sreg_out[0] !== c || sreg_out[1] !== z || sreg_out[7:2] !== sregin[7:2]) begin
            failures++;
            if (failures < 10) $display("a=%0d b=%0d op=%0d q=%0d sreg=%b", ia, ib, io, q, sreg_out);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
