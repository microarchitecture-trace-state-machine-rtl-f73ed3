// branch_logic_tb: self-checking test of the branch condition logic.
// For breq, brne, brlo and brsh, every value of the C and Z flags and a set
// of offsets k (positive and negative), it checks the taken output against
// the AVR rule (breq: Z=1, brne: Z=0, brlo: C=1, brsh: C=0) and that the
// offset output is k sign-extended to 12 bits when taken and 0 otherwise.
module branch_logic_tb;
  logic [15:0] inst;
  logic [7:0] sreg;
  logic taken;
  logic [11:0] off;
  int checks = 0, failures = 0;

  branch_logic #(.OW(12)) dut (.inst(inst), .sreg(sreg), .taken(taken), .off(off));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_t;
    logic [11:0] exp_off;
    int k;
    for (int kind = 0; kind < 4; kind++) begin   // 0 breq, 1 brne, 2 brlo, 3 brsh
      for (int ki = -64; ki < 64; ki += 7) begin
        for (int f = 0; f < 4; f++) begin        // f[0] = C, f[1] = Z
          k = ki;
          case (kind)
            0: inst = {6'b111100, 7'(k), 3'b001};
            1: inst = {6'b111101, 7'(k), 3'b001};
            2: inst = {6'b111100, 7'(k), 3'b000};
            default: inst = {6'b111101, 7'(k), 3'b000};
          endcase
          sreg = {6'($urandom), 2'(f)};
          #1;
          case (kind)
            0: exp_t = (f[1] == 1);
            1: exp_t = (f[1] == 0);
            2: exp_t = (f[0] == 1);
            default: exp_t = (f[0] == 0);
          endcase
          exp_off = exp_t ? 12'(k) : 12'd0;
          checks++;
          if (taken !== exp_t || off !== exp_off) begin
            failures++;
            $display("kind %0d k %0d f %0d: taken %b off %h", kind, k, f, taken, off);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
