// mcpu_tb: end-to-end test of the multicycle processor at its default sizes.
//
// An instruction-level reference model of the same AVR subset runs alongside
// the processor. At every return to the fetch state the testbench compares
// PC, all 32 registers, the C and Z flags and the data memory with the model,
// then lets the model execute the next instruction, and counts the cycles the
// processor spends on it against the cycles-per-instruction table
// (ldi 5, subi 8, cpi 7, ld 6, st 6, add 9, sub 9, cp 8, breq 5, rjmp 5;
// inc 7, regjump 6, brne/brlo/brsh 5).
//
// Programs:
//   1. The lecture loop: ldi r16,45; ldi r17,23; ldi r18,11; add r17,r18;
//      breq 4; rjmp -3. The first ldi and the first add are also checked
//      cycle by cycle against the published trace (state numbers, INST,
//      REG, VAL, REG2, VAL1, VAL2, RF and PC values). The loop adds 11 to r17
//      until it wraps to 0 (91 passes), then breq leaves the loop: 1739
//      cycles in total, which is checked.
//   2. A program using every instruction: ld/st through X, inc, subi, cpi,
//      sub, cp, the four conditional branches taken and not taken, regjump.
//   3. Random programs of the same instructions with forward branches.
// Every program ends in "rjmp -1", a jump to itself, which stops the test.
// Mechanisms counted (each must occur): every instruction class, branch
// taken, branch not taken, SREG update, RF write-back, RAM write, RAM read,
// PC = VAL jump.
module mcpu_tb;
  import mcpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pm_we = 1'b0;
  logic [7:0] pm_waddr = '0;
  logic [15:0] pm_wdata = '0;
  state_t state;
  logic [7:0] pc;
  logic [15:0] inst;

  mcpu dut (.clk(clk), .rst_n(rst_n), .pm_we(pm_we), .pm_waddr(pm_waddr), .pm_wdata(pm_wdata),
            .state(state), .pc(pc), .inst(inst));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- encoders (AVR formats) ----------------
  function automatic logic [15:0] e_ldi(int d, int k);  return {4'hE, 4'(k >> 4), 4'(d - 16), 4'(k)}; endfunction
  function automatic logic [15:0] e_subi(int d, int k); return {4'h5, 4'(k >> 4), 4'(d - 16), 4'(k)}; endfunction
  function automatic logic [15:0] e_cpi(int d, int k);  return {4'h3, 4'(k >> 4), 4'(d - 16), 4'(k)}; endfunction
  function automatic logic [15:0] e_rr(logic [5:0] opc, int d, int r);
    return {opc, 1'(r >> 4), 5'(d), 4'(r)};
  endfunction
  function automatic logic [15:0] e_add(int d, int r); return e_rr(6'b000011, d, r); endfunction
  function automatic logic [15:0] e_sub(int d, int r); return e_rr(6'b000110, d, r); endfunction
  function automatic logic [15:0] e_cp(int d, int r);  return e_rr(6'b000101, d, r); endfunction
  function automatic logic [15:0] e_ld(int d);  return {7'b1001000, 5'(d), 4'b1100}; endfunction
  function automatic logic [15:0] e_st(int r);  return {7'b1001001, 5'(r), 4'b1100}; endfunction
  function automatic logic [15:0] e_inc(int d); return {7'b1001010, 5'(d), 4'b0011}; endfunction
  function automatic logic [15:0] e_rjmp(int k); return {4'hC, 12'(k)}; endfunction
  // kind: 0 breq, 1 brne, 2 brlo, 3 brsh
  function automatic logic [15:0] e_br(int kind, int k);
    return {5'b11110, 1'(kind & 1), 7'(k), 2'b00, 1'(kind < 2 ? 1 : 0)};
  endfunction
  function automatic logic [15:0] e_regjump(int r); return {6'b111111, 1'(r >> 4), 5'b00000, 4'(r)}; endfunction

  // ---------------- reference model ----------------
  logic [15:0] prog [256];
  logic [7:0]  m_r [32];
  logic [7:0]  m_ram [256];
  bit          m_ram_valid [256];
  logic [7:0]  m_pc;
  logic        m_c, m_z;

  int n_class [13];
  int n_taken = 0, n_not_taken = 0, n_sreg = 0, n_wb = 0, n_ram_w = 0, n_ram_r = 0, n_pc_val = 0;
  int total_cycles = 0;

  function automatic int cpi_of(opclass_t c);
    case (c)
      OP_LDI: return 5;   OP_SUBI: return 8;  OP_CPI: return 7;   OP_LD: return 6;
      OP_ST: return 6;    OP_ADD: return 9;   OP_SUB: return 9;   OP_CP: return 8;
      OP_BRANCH: return 5; OP_RJMP: return 5; OP_INC: return 7;   OP_REGJUMP: return 6;
      default: return 2;
    endcase
  endfunction

  // Executes prog[m_pc] in the model and returns its class.
  function automatic opclass_t model_step();
    logic [15:0] w;
    opclass_t c;
    int d, r, kk, res;
    logic [7:0] kimm;
    logic [15:0] xp;
    w = prog[m_pc];
    c = decode_op(w);
    d = int'(w[8:4]);
    r = int'({w[9], w[3:0]});
    kimm = {w[11:8], w[3:0]};
    xp = {m_r[27], m_r[26]};
    // ldi, subi and cpi use r16..r31: register 16 + w[7:4]
    case (c)
      OP_LDI:  begin m_r[16 + int'(w[7:4])] = kimm; m_pc++; end
      OP_SUBI, OP_CPI: begin
        res = int'(m_r[16 + int'(w[7:4])]) - int'(kimm);
        m_c = (int'(kimm) > int'(m_r[16 + int'(w[7:4])]));
        m_z = (res[7:0] == 8'd0);
        if (c == OP_SUBI) m_r[16 + int'(w[7:4])] = res[7:0];
        m_pc++;
      end
      OP_ADD: begin
        res = int'(m_r[d]) + int'(m_r[r]);
        m_c = (res > 255); m_z = (res[7:0] == 8'd0);
        m_r[d] = res[7:0]; m_pc++;
      end
      OP_SUB, OP_CP: begin
        res = int'(m_r[d]) - int'(m_r[r]);
        m_c = (int'(m_r[r]) > int'(m_r[d])); m_z = (res[7:0] == 8'd0);
        if (c == OP_SUB) m_r[d] = res[7:0];
        m_pc++;
      end
      OP_LD:  begin m_r[d] = m_ram[xp[7:0]]; m_pc++; end
      OP_ST:  begin m_ram[xp[7:0]] = m_r[d]; m_ram_valid[xp[7:0]] = 1'b1; m_pc++; end
      OP_INC: begin m_r[d] = m_r[d] + 8'd1; m_pc++; end
      OP_BRANCH: begin
        logic flag, tk;
        flag = (w[0] == 1'b1) ? m_z : m_c;
        tk = w[10] ? !flag : flag;
        kk = int'(signed'(w[9:3]));
        if (tk) begin m_pc = m_pc + 8'(kk) + 8'd1; n_taken++; end
        else begin m_pc = m_pc + 8'd1; n_not_taken++; end
      end
      OP_RJMP:    begin kk = int'(signed'(w[11:0])); m_pc = m_pc + 8'(kk) + 8'd1; end
      OP_REGJUMP: begin m_pc = m_pc + m_r[r] + 8'd1; end
      default: m_pc++;
    endcase
    return c;
  endfunction

  // ---------------- DUT state comparison ----------------
  task automatic compare_arch(input string tag);
    bit ok;
    ok = (pc == m_pc) && (dut.u_sreg.dout[SREG_C] == m_c) && (dut.u_sreg.dout[SREG_Z] == m_z);
    for (int i = 0; i < 32; i++) if (dut.u_rf.regs[i] != m_r[i]) ok = 1'b0;
    for (int a = 0; a < 256; a++) if (m_ram_valid[a] && dut.u_ram.mem[a] != m_ram[a]) ok = 1'b0;
    check(ok, {tag, ": architectural state matches the model"});
    if (!ok && failures < 30) begin
      $display("  pc %0d/%0d C %b/%b Z %b/%b", pc, m_pc, dut.u_sreg.dout[SREG_C], m_c, dut.u_sreg.dout[SREG_Z], m_z);
      for (int i = 0; i < 32; i++) if (dut.u_rf.regs[i] != m_r[i]) $display("  r%0d %0d/%0d", i, dut.u_rf.regs[i], m_r[i]);
    end
  endtask

  // Load a program and reset; the model starts from the same reset state.
  task automatic load_and_reset();
    rst_n = 1'b0;
    for (int a = 0; a < 256; a++) begin
      pm_we = 1'b1; pm_waddr = 8'(a); pm_wdata = prog[a];
      @(posedge clk); #1;
    end
    pm_we = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < 32; i++) m_r[i] = '0;
    for (int a = 0; a < 256; a++) m_ram_valid[a] = 1'b0;
    m_pc = '0; m_c = 1'b0; m_z = 1'b0;
    rst_n = 1'b1;
  endtask

  // Run until the processor reaches a "rjmp -1" or max_instr instructions.
  task automatic run_program(input string tag, input int max_instr, output int cycles);
    int n, cyc;
    opclass_t c;
    cycles = 0;
    n = 0;
    while (n < max_instr && prog[m_pc] != e_rjmp(-1)) begin
      check(state == S_FETCH, {tag, ": instruction starts in fetch"});
      compare_arch(tag);
      c = model_step();
      n_class[c]++;
      cyc = 0;
      do begin
        case (state)
          S_SREG:   n_sreg++;
          S_WB:     n_wb++;
          S_ST:     n_ram_w++;
          S_LD:     n_ram_r++;
          S_PC_VAL: n_pc_val++;
          default: ;
        endcase
        @(posedge clk); #1;
        cyc++;
      end while (state != S_FETCH && cyc < 40);
      check(cyc == cpi_of(c), $sformatf("%s: %s took %0d cycles, expected %0d", tag, c.name(), cyc, cpi_of(c)));
      cycles += cyc;
      n++;
    end
    compare_arch({tag, " end"});
  endtask

  initial begin
    int cyc;
    foreach (n_class[i]) n_class[i] = 0;

    // ================= program 1: the lecture loop =================
    foreach (prog[a]) prog[a] = 16'h0000;
    prog[0] = e_ldi(16, 45);
    prog[1] = e_ldi(17, 23);
    prog[2] = e_ldi(18, 11);
    prog[3] = e_add(17, 18);
    prog[4] = e_br(0, 4);
    prog[5] = e_rjmp(-3);
    prog[9] = e_rjmp(-1);
    check(prog[0] == 16'd57869, "ldi r16,45 encodes as 57869");
    check(prog[2] == 16'd57387, "ldi r18,11 encodes as 57387");
    check(prog[3] == 16'd3858,  "add r17,r18 encodes as 3858");
    load_and_reset();

    // Cycle-by-cycle trace of ldi r16, 45.
    check(state == S_FETCH, "ldi c1 state 00000");
    @(posedge clk); #1; check(inst == 16'd57869, "ldi c1 INST = 57869");
    check(state == S_REG_HI, "ldi c2 state 00001");
    @(posedge clk); #1; check(dut.reg_q == 5'd16, "ldi c2 REG = 16");
    check(state == S_VAL_IMM, "ldi c3 state 00101");
    @(posedge clk); #1; check(dut.val_q == 8'd45, "ldi c3 VAL = 45");
    check(state == S_WB, "ldi c4 state 10010");
    @(posedge clk); #1; check(dut.u_rf.regs[16] == 8'd45, "ldi c4 RF[16] = 45");
    check(state == S_PC_INC, "ldi c5 state 10011");
    @(posedge clk); #1; check(pc == 8'd1, "ldi c5 PC = 1");
    check(state == S_FETCH, "ldi done");
    void'(model_step()); n_class[OP_LDI]++;
    // ldi r17 and ldi r18 through the model.
    repeat (2) begin
      opclass_t c;
      c = model_step(); n_class[c]++;
      repeat (5) begin @(posedge clk); #1; end
    end
    check(dut.u_rf.regs[17] == 8'd23 && dut.u_rf.regs[18] == 8'd11 && pc == 8'd3, "ldi r17 / r18 results, PC = 3");
    // Cycle-by-cycle trace of add r17, r18.
    check(state == S_FETCH, "add c1 state 00000");
    @(posedge clk); #1; check(inst == 16'd3858, "add c1 INST = 3858");
    check(state == S_REG_D, "add c2 state 00010");
    @(posedge clk); #1; check(dut.reg_q == 5'd17, "add c2 REG = 17");
    check(state == S_VAL1, "add c3 state 00111");
    @(posedge clk); #1; check(dut.val1_q == 8'd23, "add c3 VAL1 = 23");
    check(state == S_REG2, "add c4 state 01010");
    @(posedge clk); #1; check(dut.reg2_q == 5'd18, "add c4 REG2 = 18");
    check(state == S_VAL2_RF, "add c5 state 01000");
    @(posedge clk); #1; check(dut.val2_q == 8'd11, "add c5 VAL2 = 11");
    check(state == S_ADD, "add c6 state 01011");
    @(posedge clk); #1; check(dut.val_q == 8'd34, "add c6 VAL = 23 + 11");
    check(state == S_SREG, "add c7 state 01101");
    @(posedge clk); #1; check(dut.u_sreg.dout[SREG_Z] == 1'b0, "add c7 ZFLAG = 0");
    check(state == S_WB, "add c8 state 10010");
    @(posedge clk); #1; check(dut.u_rf.regs[17] == 8'd34, "add c8 RF[17] = 34");
    check(state == S_PC_INC, "add c9 state 10011");
    @(posedge clk); #1; check(pc == 8'd4, "add c9 PC = 4");
    void'(model_step()); n_class[OP_ADD]++;
    n_sreg++; n_wb += 4;
    run_program("loop", 400, cyc);
    cyc += 15 + 9;
    check(cyc == 1739, $sformatf("lecture loop takes %0d cycles, expected 1739", cyc));
    check(dut.u_rf.regs[17] == 8'd0 && pc == 8'd9, "loop ends with r17 = 0 at PC 9");

    // ================= program 2: every instruction =================
    foreach (prog[a]) prog[a] = 16'h0000;
    prog[0]  = e_ldi(26, 8'h40);
    prog[1]  = e_ldi(27, 0);
    prog[2]  = e_ldi(20, 200);
    prog[3]  = e_st(20);
    prog[4]  = e_ld(5);
    prog[5]  = e_inc(5);          // r5 = 201
    prog[6]  = e_subi(20, 100);   // r20 = 100
    prog[7]  = e_cpi(20, 100);    // Z = 1, C = 0
    prog[8]  = e_br(1, 2);        // brne: not taken
    prog[9]  = e_br(0, 1);        // breq: taken, skips 10
    prog[10] = e_ldi(21, 9);
    prog[11] = e_sub(20, 5);      // 100 - 201: r20 = 155, C = 1
    prog[12] = e_br(3, 1);        // brsh: not taken
    prog[13] = e_br(2, 1);        // brlo: taken, skips 14
    prog[14] = e_ldi(21, 1);
    prog[15] = e_cp(5, 20);       // 201 - 155: C = 0, Z = 0
    prog[16] = e_br(2, 1);        // brlo: not taken
    prog[17] = e_br(3, 1);        // brsh: taken, skips 18
    prog[18] = e_ldi(21, 2);
    prog[19] = e_ldi(22, 3);
    prog[20] = 16'hFFFF;          // not an instruction of this set: skipped
    prog[21] = e_regjump(22);     // PC = 21 + 3 + 1 = 25
    prog[22] = e_ldi(21, 7);
    prog[25] = e_add(21, 5);
    prog[26] = e_st(21);
    prog[27] = e_br(1, -20);      // brne backwards: Z = 0, taken -> PC 8
    prog[28] = e_rjmp(-1);
    load_and_reset();
    run_program("all instructions", 60, cyc);
    check(dut.u_rf.regs[5] == 8'd201, "program 2: r5 = 201 after ld and inc");

    // ================= program 3: random programs =================
    for (int t = 0; t < 30; t++) begin
      int len;
      len = 40;
      foreach (prog[a]) prog[a] = 16'h0000;
      prog[0] = e_ldi(26, $urandom_range(255));
      prog[1] = e_ldi(27, 0);
      prog[2] = e_st(0);
      for (int a = 3; a < len; a++) begin
        int d, r, k, pick;
        do d = $urandom_range(31); while (d == 26 || d == 27);
        r = $urandom_range(31);
        k = $urandom_range(255);
        pick = $urandom_range(10);
        case (pick)
          0: prog[a] = e_ldi(16 + (d % 16 == 10 || d % 16 == 11 ? 0 : d % 16), k);
          1: prog[a] = e_subi(16 + (d % 16 == 10 || d % 16 == 11 ? 0 : d % 16), k);
          2: prog[a] = e_cpi(16 + d % 16, k);
          3: prog[a] = e_add(d, r);
          4: prog[a] = e_sub(d, r);
          5: prog[a] = e_cp(d, r);
          6: prog[a] = e_ld(d);
          7: prog[a] = e_st(r);
          8: prog[a] = e_inc(d);
          9: prog[a] = e_br($urandom_range(3), $urandom_range(3));
          default: prog[a] = e_rjmp($urandom_range(2));
        endcase
      end
      for (int a = len; a < len + 8; a++) prog[a] = e_rjmp(-1);
      load_and_reset();
      run_program($sformatf("random %0d", t), 200, cyc);
    end

    // ================= coverage of mechanisms =================
    check(n_class[OP_LDI] > 0 && n_class[OP_SUBI] > 0 && n_class[OP_CPI] > 0 && n_class[OP_LD] > 0 &&
          n_class[OP_ST] > 0 && n_class[OP_ADD] > 0 && n_class[OP_SUB] > 0 && n_class[OP_CP] > 0 &&
          n_class[OP_BRANCH] > 0 && n_class[OP_RJMP] > 0 && n_class[OP_INC] > 0 &&
          n_class[OP_REGJUMP] > 0 && n_class[OP_OTHER] > 0, "every instruction class executed");
    check(n_taken > 0, "branch taken");
    check(n_not_taken > 0, "branch not taken");
    check(n_sreg > 0, "SREG update");
    check(n_wb > 0, "RF write-back");
    check(n_ram_w > 0, "RAM write");
    check(n_ram_r > 0, "RAM read");
    check(n_pc_val > 0, "PC = VAL jump");
    $display("instructions per class:");
    foreach (n_class[i]) $display("  %s %0d", opclass_t'(i), n_class[i]);
    $display("branches taken %0d, not taken %0d; SREG updates %0d, write-backs %0d, RAM writes %0d, reads %0d, PC=VAL %0d",
             n_taken, n_not_taken, n_sreg, n_wb, n_ram_w, n_ram_r, n_pc_val);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
