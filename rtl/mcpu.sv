// mcpu: multicycle processor for a subset of the AVR instruction set.
//
// A datapath of single-purpose registers, memories and an ALU is steered one
// state per clock cycle by a state machine controller. Each instruction runs
// as a short walk through the controller's states, from the fetch state
// (INST = PM[PC]) back to it, and every state moves one value into one
// register: for example ldi r16, 45 takes 5 cycles, INST = PM[PC],
// REG = 1,INST[7:4], VAL = INST[11:8],INST[3:0], RF[REG] = VAL, PC = PC + 1.
//
// Datapath (register <- multiplexer inputs, select signal):
//   PC    <- PC + 1 | VAL                              PC_sel
//   INST  <- PM[PC]
//   REG   <- {1,INST[7:4]} | INST[8:4]                 REG_sel
//   REG2  <- {INST[9],INST[3:0]}
//   OFF   <- INST[11:0] | (taken ? k : 0) | 1          OFF_sel
//   RF addr <- REG | REG2                              RF_sel; RF din <- VAL
//   VAL1  <- RF dout
//   VAL2  <- RF dout | {INST[11:8],INST[3:0]}          VAL2_sel
//   ALU A <- PC | VAL1 (A_sel); ALU B <- VAL2 | OFF (B_sel); op: ALU_op
//   ADDR  <- RF x (X pointer)
//   SREG  <- ALU Sreg_out; SREG feeds the ALU and the branch condition logic
//   VAL   <- RAM dout | ALU Q | RF dout | {INST[11:8],INST[3:0]}   VAL_sel
//   RAM addr <- ADDR, RAM din <- VAL
// Instructions: ldi, subi, cpi, ld Rd,X, st X,Rr, add, sub, cp, breq, rjmp,
// plus the extensions inc, regjump (PC = PC + RF[R] + 1), brne, brlo, brsh.
// The numbering of the multiplexer inputs for PC_sel, REG_sel, RF_sel,
// VAL2_sel, A_sel, B_sel and VAL_sel 1 and 3 follows the reference traces;
// the rest is this design's choice (see mcpu_pkg).
//
// Interface: clk; rst_n is a synchronous active-low reset that clears PC,
// the auxiliary registers and the register file and puts the controller in
// the fetch state. pm_we/pm_waddr/pm_wdata write a 16-bit word into program
// memory at a rising clock edge (load the program while rst_n is low).
// state, pc and inst show the controller state and the PC and INST registers.
// Unused by design: OFF[11:8] (the ALU adds the low byte of OFF), ADDR[15:8]
// (the data memory decodes only the low RAM_AW bits of X) and the branch
// logic's taken flag (its offset output already carries the decision).
module mcpu
  import mcpu_pkg::*;
#(
  parameter int unsigned PM_AW  = 8,   // program memory: 2**PM_AW words
  parameter int unsigned RAM_AW = 8,   // data memory: 2**RAM_AW bytes
  parameter int unsigned NREG   = 32   // register file size
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pm_we,
  input  logic [PM_AW-1:0] pm_waddr,
  input  logic [IW-1:0]    pm_wdata,
  output state_t           state,
  output logic [DW-1:0]    pc,
  output logic [IW-1:0]    inst
);

  localparam int unsigned OW = 12;  // OFF holds INST[11:0]
  localparam int unsigned RW = $clog2(NREG);

  ctrl_t         c;
  logic [DW-1:0] pc_d, val_q, val_d, val1_q, val2_q, val2_d;
  logic [IW-1:0] pm_dout;
  logic [RW-1:0] reg_q, reg_d, reg2_q, rf_addr;
  logic [OW-1:0] off_q, off_d, br_off;
  logic [DW-1:0] rf_dout, alu_a, alu_b, alu_q, ram_dout, imm;
  logic [2*DW-1:0] rf_x, addr_q;
  logic [7:0]    sreg_q, sreg_d;
  logic          br_taken;

  // ---------------- controller ----------------
  mcpu_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .inst_in   (inst),
    .fetch_word(pm_dout),
    .state     (state),
    .ctrl      (c)
  );

  // ---------------- fetch: PC, PM, INST ----------------
  assign pc_d = (c.pc_sel == PC_SEL_VAL) ? val_q : pc + DW'(1);

  aux_reg #(.W(DW)) u_pc (.clk(clk), .rst_n(rst_n), .we(c.pc_we), .din(pc_d), .dout(pc));

  prog_mem #(.AW(PM_AW), .IW(IW)) u_pm (
    .clk(clk), .addr(PM_AW'(pc)), .dout(pm_dout),
    .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata)
  );

  aux_reg #(.W(IW)) u_inst (.clk(clk), .rst_n(rst_n), .we(c.inst_we), .din(pm_dout), .dout(inst));

  // ---------------- decode: REG, REG2, OFF ----------------
  assign imm   = {inst[11:8], inst[3:0]};
  assign reg_d = (c.reg_sel == REG_SEL_D) ? RW'(inst[8:4]) : RW'({1'b1, inst[7:4]});

  aux_reg #(.W(RW)) u_reg  (.clk(clk), .rst_n(rst_n), .we(c.reg_we),  .din(reg_d), .dout(reg_q));
  aux_reg #(.W(RW)) u_reg2 (.clk(clk), .rst_n(rst_n), .we(c.reg2_we),
                            .din(RW'({inst[9], inst[3:0]})), .dout(reg2_q));

  branch_logic #(.OW(OW)) u_br (.inst(inst), .sreg(sreg_q), .taken(br_taken), .off(br_off));

  always_comb begin
    unique case (c.off_sel)
      OFF_SEL_K12: off_d = inst[11:0];
      OFF_SEL_BR:  off_d = br_off;
      OFF_SEL_ONE: off_d = OW'(1);
      default:     off_d = '0;
    endcase
  end

  aux_reg #(.W(OW)) u_off (.clk(clk), .rst_n(rst_n), .we(c.off_we), .din(off_d), .dout(off_q));

  // ---------------- register file and operands ----------------
  assign rf_addr = (c.rf_sel == RF_SEL_REG2) ? reg2_q : reg_q;

  reg_file #(.NREG(NREG), .DW(DW)) u_rf (
    .clk(clk), .rst_n(rst_n), .addr(rf_addr), .din(val_q), .we(c.rf_we),
    .dout(rf_dout), .x(rf_x)
  );

  assign val2_d = (c.val2_sel == VAL2_SEL_K) ? imm : rf_dout;

  aux_reg #(.W(DW)) u_val1 (.clk(clk), .rst_n(rst_n), .we(c.val1_we), .din(rf_dout), .dout(val1_q));
  aux_reg #(.W(DW)) u_val2 (.clk(clk), .rst_n(rst_n), .we(c.val2_we), .din(val2_d),  .dout(val2_q));

  // ---------------- execute: ALU and SREG ----------------
  assign alu_a = (c.a_sel == A_SEL_VAL1) ? val1_q : pc;
  assign alu_b = (c.b_sel == B_SEL_OFF)  ? off_q[DW-1:0] : val2_q;

  alu #(.W(DW)) u_alu (
    .a(alu_a), .b(alu_b), .op(c.alu_op), .sregin(sreg_q), .q(alu_q), .sreg_out(sreg_d)
  );

  aux_reg #(.W(8)) u_sreg (.clk(clk), .rst_n(rst_n), .we(c.sreg_we), .din(sreg_d), .dout(sreg_q));

  // ---------------- memory: ADDR and RAM ----------------
  aux_reg #(.W(2*DW)) u_addr (.clk(clk), .rst_n(rst_n), .we(c.addr_we), .din(rf_x), .dout(addr_q));

  data_ram #(.AW(RAM_AW), .DW(DW)) u_ram (
    .clk(clk), .addr(addr_q[RAM_AW-1:0]), .din(val_q), .we(c.ram_we), .dout(ram_dout)
  );

  // ---------------- write back: VAL ----------------
  always_comb begin
    unique case (c.val_sel)
      VAL_SEL_RAM: val_d = ram_dout;
      VAL_SEL_ALU: val_d = alu_q;
      VAL_SEL_RF:  val_d = rf_dout;
      VAL_SEL_IMM: val_d = imm;
      default:     val_d = '0;
    endcase
  end

  aux_reg #(.W(DW)) u_val (.clk(clk), .rst_n(rst_n), .we(c.val_we), .din(val_d), .dout(val_q));

endmodule
