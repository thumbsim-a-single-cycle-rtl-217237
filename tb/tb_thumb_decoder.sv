// tb_thumb_decoder: feeds one encoding of each implemented instruction (and
// of several unimplemented ones) to the decoding ROMs and compares the whole
// control word with the expected row, written out independently here.
module tb_thumb_decoder;
  import thumb_pkg::*;
  half_t instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  thumb_decoder dut (.instr, .ctrl);

  task automatic expect_row(string name, half_t i, reg_sel_e a, reg_sel_e b, reg_sel_e c,
                            rand2_sel_e r2, shift_op_e so, shift_sel_e sa, alu_op_e alu,
                            logic mrd, logic mwr, logic wf, perhaps_e wr, perhaps_e wl);
    // fields marked don't-care (RS_X where unused) are compared as well,
    // since the tables give them the encoding 0
    ctrl_t e;
    instr = i; #1;
    e = '{valid: 1'b1, reg_sel_a: a, reg_sel_b: b, reg_sel_c: c, rand2: r2,
          shift_op: so, shift_amt: sa, alu_sel: alu, mem_rd: mrd, mem_wr: mwr,
          w_flags: wf, w_reg: wr, w_link: wl};
    checks++;
    if (ctrl !== e) begin
      failures++; $display("FAIL %s instr=%h got %h exp %h", name, i, ctrl, e);
    end
  endtask

  task automatic expect_missing(half_t i);
    instr = i; #1;
    checks++;
    if (ctrl.valid !== 1'b0 || ctrl.mem_wr || ctrl.w_flags || ctrl.w_reg != P_NO || ctrl.w_link != P_NO) begin
      failures++; $display("FAIL missing instr=%h got %h", i, ctrl);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    expect_row("lsls i",  16'h0088, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_IMM, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("lsrs i",  16'h0888, RS_X, RS_Y, RS_X, R2_REGB, SH_LSR, SA_IMR, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("asrs i",  16'h1088, RS_X, RS_Y, RS_X, R2_REGB, SH_ASR, SA_IMR, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("adds r",  16'h1888, RS_Y, RS_Z, RS_X, R2_RIMM3, SH_LSL, SA_0, ALU_BIT9, 0,0,1, P_YES, P_NO);
    expect_row("subs i3", 16'h1E88, RS_Y, RS_Z, RS_X, R2_RIMM3, SH_LSL, SA_0, ALU_BIT9, 0,0,1, P_YES, P_NO);
    expect_row("movs i8", 16'h2155, RS_X, RS_X, RS_W, R2_IMM8, SH_LSL, SA_0, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("cmp i8",  16'h2955, RS_W, RS_X, RS_X, R2_IMM8, SH_LSL, SA_0, ALU_SUB, 0,0,1, P_NO, P_NO);
    expect_row("adds i8", 16'h3155, RS_W, RS_X, RS_W, R2_IMM8, SH_LSL, SA_0, ALU_ADD, 0,0,1, P_YES, P_NO);
    expect_row("subs i8", 16'h3955, RS_W, RS_X, RS_W, R2_IMM8, SH_LSL, SA_0, ALU_SUB, 0,0,1, P_YES, P_NO);
    expect_row("ands",    16'h4008, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_AND, 0,0,1, P_YES, P_NO);
    expect_row("eors",    16'h4048, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_EOR, 0,0,1, P_YES, P_NO);
    expect_row("lsls r",  16'h4088, RS_Y, RS_X, RS_X, R2_REGB, SH_LSL, SA_REG, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("lsrs r",  16'h40C8, RS_Y, RS_X, RS_X, R2_REGB, SH_LSR, SA_REG, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("asrs r",  16'h4108, RS_Y, RS_X, RS_X, R2_REGB, SH_ASR, SA_REG, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("adcs",    16'h4148, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_ADC, 0,0,1, P_YES, P_NO);
    expect_row("sbcs",    16'h4188, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_SBC, 0,0,1, P_YES, P_NO);
    expect_row("rors",    16'h41C8, RS_Y, RS_X, RS_X, R2_REGB, SH_ROR, SA_REG, ALU_MOV, 0,0,1, P_YES, P_NO);
    expect_row("tst",     16'h4208, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_AND, 0,0,1, P_NO, P_NO);
    expect_row("negs",    16'h4248, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_NEG, 0,0,1, P_YES, P_NO);
    expect_row("cmp",     16'h4288, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_SUB, 0,0,1, P_NO, P_NO);
    expect_row("cmn",     16'h42C8, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_ADD, 0,0,1, P_NO, P_NO);
    expect_row("orrs",    16'h4308, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_ORR, 0,0,1, P_YES, P_NO);
    expect_row("muls",    16'h4348, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_MUL, 0,0,1, P_YES, P_NO);
    expect_row("bics",    16'h4388, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_BIC, 0,0,1, P_YES, P_NO);
    expect_row("mvns",    16'h43C8, RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_MVN, 0,0,1, P_YES, P_NO);
    expect_row("add hi",  16'h4468, RS_XX, RS_YY, RS_XX, R2_REGB, SH_LSL, SA_0, ALU_ADD, 0,0,0, P_YES, P_NO);
    expect_row("cmp hi",  16'h4568, RS_XX, RS_YY, RS_X,  R2_REGB, SH_LSL, SA_0, ALU_SUB, 0,0,1, P_NO, P_NO);
    expect_row("mov hi",  16'h4668, RS_X, RS_YY, RS_XX, R2_REGB, SH_LSL, SA_0, ALU_MOV, 0,0,0, P_YES, P_NO);
    expect_row("bx",      16'h4770, RS_X, RS_YY, RS_PC, R2_REGB, SH_LSL, SA_0, ALU_MOV, 0,0,0, P_YES, P_MAYBE);
    expect_row("blx",     16'h47F0, RS_X, RS_YY, RS_PC, R2_REGB, SH_LSL, SA_0, ALU_MOV, 0,0,0, P_YES, P_MAYBE);
    expect_row("ldr pc",  16'h4A10, RS_PC, RS_X, RS_W, R2_IMM8, SH_LSL, SA_2, ALU_ADR, 1,0,0, P_YES, P_NO);
    expect_row("str r",   16'h5088, RS_Y, RS_Z, RS_X, R2_REGB, SH_LSL, SA_0, ALU_ADD, 0,1,0, P_NO, P_NO);
    expect_row("ldr r",   16'h5888, RS_Y, RS_Z, RS_X, R2_REGB, SH_LSL, SA_0, ALU_ADD, 1,0,0, P_YES, P_NO);
    expect_row("str i5",  16'h6088, RS_Y, RS_X, RS_X, R2_IMM5, SH_LSL, SA_2, ALU_ADD, 0,1,0, P_NO, P_NO);
    expect_row("ldr i5",  16'h6888, RS_Y, RS_X, RS_X, R2_IMM5, SH_LSL, SA_2, ALU_ADD, 1,0,0, P_YES, P_NO);
    expect_row("str sp",  16'h9101, RS_SP, RS_X, RS_W, R2_IMM8, SH_LSL, SA_2, ALU_ADD, 0,1,0, P_NO, P_NO);
    expect_row("ldr sp",  16'h9901, RS_SP, RS_X, RS_W, R2_IMM8, SH_LSL, SA_2, ALU_ADD, 1,0,0, P_YES, P_NO);
    expect_row("add pc",  16'hA101, RS_PC, RS_X, RS_W, R2_IMM8, SH_LSL, SA_2, ALU_ADR, 0,0,0, P_YES, P_NO);
    expect_row("add sp",  16'hA901, RS_SP, RS_X, RS_W, R2_IMM8, SH_LSL, SA_2, ALU_ADD, 0,0,0, P_YES, P_NO);
    expect_row("sub sp",  16'hB081, RS_SP, RS_X, RS_SP, R2_IMM7, SH_LSL, SA_2, ALU_BIT7, 0,0,0, P_YES, P_NO);
    expect_row("beq",     16'hD0FE, RS_PC, RS_X, RS_PC, R2_SIMM8, SH_LSL, SA_1, ALU_ADD, 0,0,0, P_MAYBE, P_NO);
    expect_row("ble",     16'hDD02, RS_PC, RS_X, RS_PC, R2_SIMM8, SH_LSL, SA_1, ALU_ADD, 0,0,0, P_MAYBE, P_NO);
    expect_row("b",       16'hE7FE, RS_PC, RS_X, RS_PC, R2_SIMM11, SH_LSL, SA_1, ALU_ADD, 0,0,0, P_YES, P_NO);
    expect_row("bl1",     16'hF000, RS_PC, RS_X, RS_LR, R2_SIMM11, SH_LSL, SA_12, ALU_ADD, 0,0,0, P_YES, P_NO);
    expect_row("bl2",     16'hF808, RS_LR, RS_X, RS_PC, R2_IMM11, SH_LSL, SA_1, ALU_ADD, 0,0,0, P_YES, P_YES);
    // unimplemented: strb imm, ldrh imm, push, pop, stm, ldm, opcode 29
    expect_missing(16'h7088); expect_missing(16'h8888); expect_missing(16'hBC01);
    expect_missing(16'hC001); expect_missing(16'hC801); expect_missing(16'hE801);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
