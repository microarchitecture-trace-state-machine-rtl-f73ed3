// mcpu_ctrl_tb: self-checking test of the state machine controller.
// The testbench plays the INST register: it shows each instruction word on
// fetch_word during the fetch state and on inst_in from the clock edge where
// INST_we is high. For every instruction class it records the states visited
// from one fetch to the next and compares them with the expected sequence;
// the length of that sequence is the instruction's cycle count, which is also
// compared with the cycles-per-instruction table (ldi 5, subi 8, cpi 7, ld 6,
// st 6, add 9, sub 9, cp 8, breq 5, rjmp 5; extensions inc 7, regjump 6).
// It also checks the control signals of the states shown in the reference
// traces of ldi and add.
module mcpu_ctrl_tb;
  import mcpu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] inst_in = '0, fetch_word = '0;
  state_t state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  mcpu_ctrl dut (.clk(clk), .rst_n(rst_n), .inst_in(inst_in), .fetch_word(fetch_word),
                 .state(state), .ctrl(ctrl));

  always #5 clk = ~clk;

  always @(posedge clk) if (ctrl.inst_we) inst_in <= fetch_word;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %b)", what, state); end
  endtask

  // Control signals of the trace states.
  task automatic check_ctrl();
    case (state)
      S_FETCH:   check(ctrl.inst_we && !ctrl.pc_we && !ctrl.rf_we, "00000 INST_we only");
      S_REG_HI:  check(ctrl.reg_we && ctrl.reg_sel == 1'b0, "00001 REG_we=1 REG_sel=0");
      S_REG_D:   check(ctrl.reg_we && ctrl.reg_sel == 1'b1, "00010 REG_we=1 REG_sel=1");
      S_VAL_IMM: check(ctrl.val_we && ctrl.val_sel == 2'd3, "00101 VAL_we=1 VAL_sel=3");
      S_VAL1:    check(ctrl.val1_we && ctrl.rf_sel == 1'b0, "00111 VAL1_we=1 RF_sel=0");
      S_REG2:    check(ctrl.reg2_we && !ctrl.val_we, "01010 REG2_we=1");
      S_VAL2_RF: check(ctrl.val2_we && ctrl.val2_sel == 1'b0 && ctrl.rf_sel == 1'b1, "01000 VAL2_we VAL2_sel=0 RF_sel=1");
      S_ADD:     check(ctrl.val_we && ctrl.val_sel == 2'd1 && ctrl.a_sel && !ctrl.b_sel && ctrl.alu_op == 1'b0,
                       "01011 VAL_we VAL_sel=1 A_sel=1 B_sel=0 ALU_op=0");
      S_SREG:    check(ctrl.sreg_we && !ctrl.val_we && !ctrl.rf_we, "01101 SREG_we=1");
      S_WB:      check(ctrl.rf_we && ctrl.rf_sel == 1'b0 && !ctrl.val_we, "10010 RF_we=1 RF_sel=0");
      S_PC_INC:  check(ctrl.pc_we && ctrl.pc_sel == 1'b0, "10011 PC_we=1 PC_sel=0");
      S_PC_VAL:  check(ctrl.pc_we && ctrl.pc_sel == 1'b1, "10100 PC_we=1 PC=VAL");
      S_ST:      check(ctrl.ram_we && !ctrl.rf_we, "10001 RAM_we=1");
      default: ;
    endcase
  endtask

  // Run one instruction from the fetch state; returns the visited states.
  task automatic run(input logic [15:0] w, input string name, input logic [4:0] exp[$]);
    logic [4:0] seen[$];
    seen = {};
    fetch_word = w;
    check(state == S_FETCH, {name, ": starts in fetch"});
    do begin
      seen.push_back(state);
      check_ctrl();
      @(posedge clk); #1;
      fetch_word = 16'h0000;
    end while (state != S_FETCH && seen.size() < 20);
    check(seen == exp, {name, ": state sequence"});
    check(seen.size() == exp.size(), {name, ": cycles per instruction"});
    if (seen != exp) begin
      foreach (seen[i]) $write("%b ", seen[i]);
      $display("");
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1'b1;
    run(16'hE20D, "ldi r16,45",   '{5'b00000, 5'b00001, 5'b00101, 5'b10010, 5'b10011});
    run(16'h5015, "subi r17,5",   '{5'b00000, 5'b00001, 5'b00111, 5'b01111, 5'b01100, 5'b01101, 5'b10010, 5'b10011});
    run(16'h3012, "cpi r17,2",    '{5'b00000, 5'b00001, 5'b00111, 5'b01111, 5'b01100, 5'b01101, 5'b10011});
    run(16'h910C, "ld r16,X",     '{5'b00000, 5'b00010, 5'b01001, 5'b10000, 5'b10010, 5'b10011});
    run(16'h931C, "st X,r17",     '{5'b00000, 5'b00010, 5'b01001, 5'b00110, 5'b10001, 5'b10011});
    run(16'h0F12, "add r17,r18",  '{5'b00000, 5'b00010, 5'b00111, 5'b01010, 5'b01000, 5'b01011, 5'b01101, 5'b10010, 5'b10011});
    run(16'h1B12, "sub r17,r18",  '{5'b00000, 5'b00010, 5'b00111, 5'b01010, 5'b01000, 5'b01100, 5'b01101, 5'b10010, 5'b10011});
    run(16'h1712, "cp r17,r18",   '{5'b00000, 5'b00010, 5'b00111, 5'b01010, 5'b01000, 5'b01100, 5'b01101, 5'b10011});
    run(16'hF021, "breq 4",       '{5'b00000, 5'b00011, 5'b01110, 5'b10100, 5'b10011});
    run(16'hF421, "brne 4",       '{5'b00000, 5'b00011, 5'b01110, 5'b10100, 5'b10011});
    run(16'hF020, "brlo 4",       '{5'b00000, 5'b00011, 5'b01110, 5'b10100, 5'b10011});
    run(16'hF420, "brsh 4",       '{5'b00000, 5'b00011, 5'b01110, 5'b10100, 5'b10011});
    run(16'hCFFD, "rjmp -3",      '{5'b00000, 5'b00100, 5'b01110, 5'b10100, 5'b10011});
    run(16'h9413, "inc r1",       '{5'b00000, 5'b00010, 5'b00111, 5'b10101, 5'b10110, 5'b10010, 5'b10011});
    run(16'hFE03, "regjump r19",  '{5'b00000, 5'b01010, 5'b01000, 5'b10111, 5'b10100, 5'b10011});
    run(16'h0000, "unused word",  '{5'b00000, 5'b10011});
    // The SREG-update state keeps the ALU on the operation it follows.
    fetch_word = 16'h1B12;
    while (state != S_SREG) begin @(posedge clk); #1; fetch_word = 16'h0000; end
    check(ctrl.alu_op == ALU_SUB && ctrl.a_sel == A_SEL_VAL1 && ctrl.b_sel == B_SEL_VAL2, "sub: SREG state ALU selects");
    while (state != S_FETCH) begin @(posedge clk); #1; end
    // Reset returns to fetch from the middle of an instruction.
    fetch_word = 16'h0F12;
    repeat (3) begin @(posedge clk); #1; end
    rst_n = 1'b0; @(posedge clk); #1;
    check(state == S_FETCH, "reset to fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
