// mcpu_ctrl: the state machine controller of the multicycle processor.
//
// Every instruction is executed as a sequence of states, one per clock cycle,
// that starts and ends in the fetch state 00000 (INST = PM[PC]). The next
// state depends on the current state and, from the fetch onwards, on the
// opcode of the instruction: the controller decodes inst_in, the datapath's
// INST register. The fetch state must already pick the first decode state
// while INST is still being loaded, so for that one decision the controller
// decodes fetch_word, the program memory output that INST is about to take. The control outputs depend on the state alone
// (Moore machine), with one exception: the SREG-update state 01101 keeps the
// ALU selects of the arithmetic state before it (A = VAL1, B = VAL2, and add
// for add, subtract otherwise) so that the flags written are those of the
// operation just performed; the state sequence and all enables are as in the
// reference state diagram.
//
// Sequences (cycles per instruction):
//   ldi  00000 00001 00101 10010 10011                         (5)
//   subi 00000 00001 00111 01111 01100 01101 10010 10011       (8)
//   cpi  00000 00001 00111 01111 01100 01101 10011             (7)
//   ld   00000 00010 01001 10000 10010 10011                   (6)
//   st   00000 00010 01001 00110 10001 10011                   (6)
//   add  00000 00010 00111 01010 01000 01011 01101 10010 10011 (9)
//   sub  00000 00010 00111 01010 01000 01100 01101 10010 10011 (9)
//   cp   00000 00010 00111 01010 01000 01100 01101 10011       (8)
//   breq, brne, brlo, brsh  00000 00011 01110 10100 10011      (5)
//   rjmp 00000 00100 01110 10100 10011                         (5)
//   inc  00000 00010 00111 10101 10110 10010 10011             (7)
//   regjump 00000 01010 01000 10111 10100 10011                (6)
// The inc and regjump sequences and the three states 10101, 10110, 10111 are
// extensions; their state numbers are chosen here. An instruction outside
// this set goes from fetch straight to PC = PC + 1 (two cycles).
//
// Reset (synchronous, active low) puts the machine in the fetch state.
module mcpu_ctrl
  import mcpu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW-1:0] inst_in,
  input  logic [IW-1:0] fetch_word,
  output state_t        state,
  output ctrl_t         ctrl
);

  state_t   next;
  opclass_t op;        // instruction held in INST
  opclass_t fetch_op;  // instruction being fetched (PM output)

  assign op       = decode_op(inst_in);
  assign fetch_op = decode_op(fetch_word);

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= next;
  end

  // Next-state logic.
  always_comb begin
    next = S_FETCH;
    unique case (state)
      S_FETCH: begin
        unique case (fetch_op)
          OP_LDI, OP_SUBI, OP_CPI:               next = S_REG_HI;
          OP_LD, OP_ST, OP_ADD, OP_SUB, OP_CP,
          OP_INC:                                next = S_REG_D;
          OP_BRANCH:                             next = S_OFF_BR;
          OP_RJMP:                               next = S_OFF_RJ;
          OP_REGJUMP:                            next = S_REG2;
          default:                               next = S_PC_INC;
        endcase
      end
      S_REG_HI:   next = (op == OP_LDI) ? S_VAL_IMM : S_VAL1;
      S_REG_D:    next = (op == OP_LD || op == OP_ST) ? S_ADDR_X : S_VAL1;
      S_OFF_BR:   next = S_PC_OFF;
      S_OFF_RJ:   next = S_PC_OFF;
      S_VAL_IMM:  next = S_WB;
      S_VAL_RF:   next = S_ST;
      S_VAL1: begin
        if (op == OP_SUBI || op == OP_CPI) next = S_VAL2_IMM;
        else if (op == OP_INC)             next = S_OFF_ONE;
        else                               next = S_REG2;
      end
      S_VAL2_RF: begin
        if (op == OP_ADD)          next = S_ADD;
        else if (op == OP_REGJUMP) next = S_PC_VAL2;
        else                       next = S_SUB;
      end
      S_ADDR_X:   next = (op == OP_LD) ? S_LD : S_VAL_RF;
      S_REG2:     next = S_VAL2_RF;
      S_ADD:      next = S_SREG;
      S_SUB:      next = S_SREG;
      S_SREG:     next = (op == OP_CPI || op == OP_CP) ? S_PC_INC : S_WB;
      S_PC_OFF:   next = S_PC_VAL;
      S_VAL2_IMM: next = S_SUB;
      S_LD:       next = S_WB;
      S_ST:       next = S_PC_INC;
      S_WB:       next = S_PC_INC;
      S_PC_INC:   next = S_FETCH;
      S_PC_VAL:   next = S_PC_INC;
      S_OFF_ONE:  next = S_INC;
      S_INC:      next = S_WB;
      S_PC_VAL2:  next = S_PC_VAL;
      default:    next = S_FETCH;
    endcase
  end

  // Control outputs (all zero unless listed).
  always_comb begin
    ctrl = '0;
    unique case (state)
      S_FETCH:    ctrl.inst_we = 1'b1;
      S_REG_HI:   begin ctrl.reg_we = 1'b1; ctrl.reg_sel = REG_SEL_HI; end
      S_REG_D:    begin ctrl.reg_we = 1'b1; ctrl.reg_sel = REG_SEL_D; end
      S_OFF_BR:   begin ctrl.off_we = 1'b1; ctrl.off_sel = OFF_SEL_BR; end
      S_OFF_RJ:   begin ctrl.off_we = 1'b1; ctrl.off_sel = OFF_SEL_K12; end
      S_VAL_IMM:  begin ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_IMM; end
      S_VAL_RF:   begin ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_RF; ctrl.rf_sel = RF_SEL_REG; end
      S_VAL1:     begin ctrl.val1_we = 1'b1; ctrl.rf_sel = RF_SEL_REG; end
      S_VAL2_RF:  begin ctrl.val2_we = 1'b1; ctrl.val2_sel = VAL2_SEL_RF; ctrl.rf_sel = RF_SEL_REG2; end
      S_ADDR_X:   ctrl.addr_we = 1'b1;
      S_REG2:     ctrl.reg2_we = 1'b1;
      S_ADD: begin
        ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_ALU;
        ctrl.a_sel = A_SEL_VAL1; ctrl.b_sel = B_SEL_VAL2; ctrl.alu_op = ALU_ADD;
      end
      S_SUB: begin
        ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_ALU;
        ctrl.a_sel = A_SEL_VAL1; ctrl.b_sel = B_SEL_VAL2; ctrl.alu_op = ALU_SUB;
      end
      S_SREG: begin
        ctrl.sreg_we = 1'b1;
        ctrl.a_sel = A_SEL_VAL1; ctrl.b_sel = B_SEL_VAL2;
        ctrl.alu_op = (op == OP_ADD) ? ALU_ADD : ALU_SUB;
      end
      S_PC_OFF: begin
        ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_ALU;
        ctrl.a_sel = A_SEL_PC; ctrl.b_sel = B_SEL_OFF; ctrl.alu_op = ALU_ADD;
      end
      S_VAL2_IMM: begin ctrl.val2_we = 1'b1; ctrl.val2_sel = VAL2_SEL_K; end
      S_LD:       begin ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_RAM; end
      S_ST:       ctrl.ram_we = 1'b1;
      S_WB:       begin ctrl.rf_we = 1'b1; ctrl.rf_sel = RF_SEL_REG; end
      S_PC_INC:   begin ctrl.pc_we = 1'b1; ctrl.pc_sel = PC_SEL_INC; end
      S_PC_VAL:   begin ctrl.pc_we = 1'b1; ctrl.pc_sel = PC_SEL_VAL; end
      S_OFF_ONE:  begin ctrl.off_we = 1'b1; ctrl.off_sel = OFF_SEL_ONE; end
      S_INC: begin
        ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_ALU;
        ctrl.a_sel = A_SEL_VAL1; ctrl.b_sel = B_SEL_OFF; ctrl.alu_op = ALU_ADD;
      end
      S_PC_VAL2: begin
        ctrl.val_we = 1'b1; ctrl.val_sel = VAL_SEL_ALU;
        ctrl.a_sel = A_SEL_PC; ctrl.b_sel = B_SEL_VAL2; ctrl.alu_op = ALU_ADD;
      end
      default: ctrl = '0;
    endcase
  end

endmodule
