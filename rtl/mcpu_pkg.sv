// mcpu_pkg: types and constants shared by the multicycle AVR-subset processor.
//
// The processor executes each instruction as a walk through a state machine,
// one state per clock cycle. The state numbers of the base machine (fetch,
// decode, execute, memory and write-back states of ldi, subi, cpi, ld, st,
// add, sub, cp, breq, rjmp) are the ones of the reference state diagram; the
// three states added for the inc and regjump extensions carry numbers chosen
// here (10101, 10110, 10111) because no numbers are given for them.
//
// ctrl_t bundles every control signal the controller sends to the datapath.
// Widths: every select is one bit except OFF_sel (two bits: it gained a third
// input, the constant 1, for inc) and VAL_sel (four inputs).
package mcpu_pkg;

  // Data path width (AVR registers are 8 bits) and instruction width.
  localparam int unsigned DW = 8;
  localparam int unsigned IW = 16;

  typedef enum logic [4:0] {
    S_FETCH    = 5'b00000,  // INST = PM[PC]
    S_REG_HI   = 5'b00001,  // REG = 1,INST[7:4]        (r16..r31)
    S_REG_D    = 5'b00010,  // REG = INST[8:4]
    S_OFF_BR   = 5'b00011,  // OFF = taken ? k : 0     (conditional branch)
    S_OFF_RJ   = 5'b00100,  // OFF = INST[11:0]         (rjmp)
    S_VAL_IMM  = 5'b00101,  // VAL = INST[11:8],INST[3:0]
    S_VAL_RF   = 5'b00110,  // VAL = RF[REG]            (st)
    S_VAL1     = 5'b00111,  // VAL1 = RF[REG]
    S_VAL2_RF  = 5'b01000,  // VAL2 = RF[REG2]
    S_ADDR_X   = 5'b01001,  // ADDR = X
    S_REG2     = 5'b01010,  // REG2 = INST[9],INST[3:0]
    S_ADD      = 5'b01011,  // VAL = VAL1 + VAL2
    S_SUB      = 5'b01100,  // VAL = VAL1 - VAL2
    S_SREG     = 5'b01101,  // update SREG
    S_PC_OFF   = 5'b01110,  // VAL = PC + OFF
    S_VAL2_IMM = 5'b01111,  // VAL2 = INST[11:8],INST[3:0]
    S_LD       = 5'b10000,  // VAL = RAM[ADDR]
    S_ST       = 5'b10001,  // RAM[ADDR] = VAL
    S_WB       = 5'b10010,  // RF[REG] = VAL
    S_PC_INC   = 5'b10011,  // PC = PC + 1
    S_PC_VAL   = 5'b10100,  // PC = VAL
    S_OFF_ONE  = 5'b10101,  // OFF = 1                  (inc)
    S_INC      = 5'b10110,  // VAL = VAL1 + OFF         (inc)
    S_PC_VAL2  = 5'b10111   // VAL = PC + VAL2          (regjump)
  } state_t;

  // Instruction classes recognised by the decoder.
  typedef enum logic [3:0] {
    OP_LDI, OP_SUBI, OP_CPI, OP_LD, OP_ST, OP_ADD, OP_SUB, OP_CP,
    OP_BRANCH, OP_RJMP, OP_INC, OP_REGJUMP, OP_OTHER
  } opclass_t;

  // Select encodings.
  localparam logic       PC_SEL_INC  = 1'b0;  // PC <= PC + 1
  localparam logic       PC_SEL_VAL  = 1'b1;  // PC <= VAL
  localparam logic       REG_SEL_HI  = 1'b0;  // 1,INST[7:4]
  localparam logic       REG_SEL_D   = 1'b1;  // INST[8:4]
  localparam logic [1:0] OFF_SEL_K12 = 2'd0;  // INST[11:0]
  localparam logic [1:0] OFF_SEL_BR  = 2'd1;  // branch mux: k or 0
  localparam logic [1:0] OFF_SEL_ONE = 2'd2;  // constant 1
  localparam logic       RF_SEL_REG  = 1'b0;
  localparam logic       RF_SEL_REG2 = 1'b1;
  localparam logic       VAL2_SEL_RF = 1'b0;
  localparam logic       VAL2_SEL_K  = 1'b1;
  localparam logic       A_SEL_PC    = 1'b0;
  localparam logic       A_SEL_VAL1  = 1'b1;
  localparam logic       B_SEL_VAL2  = 1'b0;
  localparam logic       B_SEL_OFF   = 1'b1;
  localparam logic       ALU_ADD     = 1'b0;
  localparam logic       ALU_SUB     = 1'b1;
  localparam logic [1:0] VAL_SEL_RAM = 2'd0;
  localparam logic [1:0] VAL_SEL_ALU = 2'd1;
  localparam logic [1:0] VAL_SEL_RF  = 2'd2;
  localparam logic [1:0] VAL_SEL_IMM = 2'd3;

  // SREG bit positions (AVR layout).
  localparam int unsigned SREG_C = 0;
  localparam int unsigned SREG_Z = 1;

  typedef struct packed {
    logic       pc_we;
    logic       pc_sel;
    logic       inst_we;
    logic       reg_we;
    logic       reg_sel;
    logic       reg2_we;
    logic       off_we;
    logic [1:0] off_sel;
    logic       rf_we;
    logic       rf_sel;
    logic       val1_we;
    logic       val2_we;
    logic       val2_sel;
    logic       a_sel;
    logic       b_sel;
    logic       alu_op;
    logic       addr_we;
    logic       sreg_we;
    logic       ram_we;
    logic       val_we;
    logic [1:0] val_sel;
  } ctrl_t;

  // Classify a 16-bit AVR instruction word.
  function automatic opclass_t decode_op(input logic [IW-1:0] inst);
    opclass_t c;
    c = OP_OTHER;
    casez (inst)
      16'b1110_????_????_????: c = OP_LDI;
      16'b0101_????_????_????: c = OP_SUBI;
      16'b0011_????_????_????: c = OP_CPI;
      16'b1001_000?_????_1100: c = OP_LD;       // ld Rd, X
      16'b1001_001?_????_1100: c = OP_ST;       // st X, Rr
      16'b0000_11??_????_????: c = OP_ADD;
      16'b0001_10??_????_????: c = OP_SUB;
      16'b0001_01??_????_????: c = OP_CP;
      16'b1111_0???_????_?00?: c = OP_BRANCH;   // brlo/breq/brsh/brne
      16'b1100_????_????_????: c = OP_RJMP;
      16'b1001_010?_????_0011: c = OP_INC;
      16'b1111_11?0_0000_????: c = OP_REGJUMP;
      default:                 c = OP_OTHER;
    endcase
    return c;
  endfunction

endpackage
