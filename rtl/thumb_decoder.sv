// thumb_decoder: the instruction decoding ROMs.
//
// Maps a 16-bit Thumb instruction to the "decoded" control word (ctrl_t),
// the signals that depend only on the opcode. Three tables are used:
//   table 1 (32 rows) indexed by instr[15:11], for every opcode except 01000;
//   table 2 (16 rows) indexed by instr[9:6] when instr[15:10] = 010000
//                     (the two-register ALU operations);
//   table 3 (4 rows)  indexed by instr[9:8] when instr[15:10] = 010001
//                     (add/cmp/mov on high registers, bx/blx).
// Rows the machine does not implement (byte and halfword transfers, push,
// pop, ldm, stm, opcode 29) come out with valid = 0 and every write enable
// off. Fields marked don't-care in the tables are given the encoding 0.
// The tables are written as case statements; in hardware they are ROMs.
// Purely combinational.
module thumb_decoder
  import thumb_pkg::*;
(
  input  half_t instr,
  output ctrl_t ctrl
);
  // Shorthand for a table row (valid = 1).
  function automatic ctrl_t row(
    reg_sel_e a, reg_sel_e b, reg_sel_e c, rand2_sel_e r2, shift_op_e sop,
    shift_sel_e samt, alu_op_e alu, logic mrd, logic mwr, logic wfl,
    perhaps_e wreg, perhaps_e wlink);
    return '{valid: 1'b1, reg_sel_a: a, reg_sel_b: b, reg_sel_c: c,
             rand2: r2, shift_op: sop, shift_amt: samt, alu_sel: alu,
             mem_rd: mrd, mem_wr: mwr, w_flags: wfl, w_reg: wreg,
             w_link: wlink};
  endfunction

  localparam ctrl_t MISSING = '{valid: 1'b0, reg_sel_a: RS_X, reg_sel_b: RS_X,
                                reg_sel_c: RS_X, rand2: R2_REGB,
                                shift_op: SH_LSL, shift_amt: SA_0,
                                alu_sel: ALU_ADD, mem_rd: 1'b0, mem_wr: 1'b0,
                                w_flags: 1'b0, w_reg: P_NO, w_link: P_NO};

  localparam logic T = 1'b1;
  localparam logic F = 1'b0;

  ctrl_t d1, d2, d3;

  // Table 1: instr[15:11].
  always_comb begin
    unique case (instr[15:11])
      5'd0:  d1 = row(RS_X,  RS_Y, RS_X,  R2_REGB,   SH_LSL, SA_IMM, ALU_MOV,  F, F, T, P_YES,   P_NO);  // lsls imm
      5'd1:  d1 = row(RS_X,  RS_Y, RS_X,  R2_REGB,   SH_LSR, SA_IMR, ALU_MOV,  F, F, T, P_YES,   P_NO);  // lsrs imm
      5'd2:  d1 = row(RS_X,  RS_Y, RS_X,  R2_REGB,   SH_ASR, SA_IMR, ALU_MOV,  F, F, T, P_YES,   P_NO);  // asrs imm
      5'd3:  d1 = row(RS_Y,  RS_Z, RS_X,  R2_RIMM3,  SH_LSL, SA_0,   ALU_BIT9, F, F, T, P_YES,   P_NO);  // adds/subs
      5'd4:  d1 = row(RS_X,  RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_0,   ALU_MOV,  F, F, T, P_YES,   P_NO);  // movs i8
      5'd5:  d1 = row(RS_W,  RS_X, RS_X,  R2_IMM8,   SH_LSL, SA_0,   ALU_SUB,  F, F, T, P_NO,    P_NO);  // cmp i8
      5'd6:  d1 = row(RS_W,  RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_0,   ALU_ADD,  F, F, T, P_YES,   P_NO);  // adds i8
      5'd7:  d1 = row(RS_W,  RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_0,   ALU_SUB,  F, F, T, P_YES,   P_NO);  // subs i8
      5'd9:  d1 = row(RS_PC, RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_2,   ALU_ADR,  T, F, F, P_YES,   P_NO);  // ldr pc
      5'd10: d1 = row(RS_Y,  RS_Z, RS_X,  R2_REGB,   SH_LSL, SA_0,   ALU_ADD,  F, T, F, P_NO,    P_NO);  // str r
      5'd11: d1 = row(RS_Y,  RS_Z, RS_X,  R2_REGB,   SH_LSL, SA_0,   ALU_ADD,  T, F, F, P_YES,   P_NO);  // ldr r
      5'd12: d1 = row(RS_Y,  RS_X, RS_X,  R2_IMM5,   SH_LSL, SA_2,   ALU_ADD,  F, T, F, P_NO,    P_NO);  // str i5
      5'd13: d1 = row(RS_Y,  RS_X, RS_X,  R2_IMM5,   SH_LSL, SA_2,   ALU_ADD,  T, F, F, P_YES,   P_NO);  // ldr i5
      5'd18: d1 = row(RS_SP, RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_2,   ALU_ADD,  F, T, F, P_NO,    P_NO);  // str sp
      5'd19: d1 = row(RS_SP, RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_2,   ALU_ADD,  T, F, F, P_YES,   P_NO);  // ldr sp
      5'd20: d1 = row(RS_PC, RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_2,   ALU_ADR,  F, F, F, P_YES,   P_NO);  // add pc
      5'd21: d1 = row(RS_SP, RS_X, RS_W,  R2_IMM8,   SH_LSL, SA_2,   ALU_ADD,  F, F, F, P_YES,   P_NO);  // add sp
      5'd22: d1 = row(RS_SP, RS_X, RS_SP, R2_IMM7,   SH_LSL, SA_2,   ALU_BIT7, F, F, F, P_YES,   P_NO);  // add/sub sp
      5'd26,
      5'd27: d1 = row(RS_PC, RS_X, RS_PC, R2_SIMM8,  SH_LSL, SA_1,   ALU_ADD,  F, F, F, P_MAYBE, P_NO);  // b<c>
      5'd28: d1 = row(RS_PC, RS_X, RS_PC, R2_SIMM11, SH_LSL, SA_1,   ALU_ADD,  F, F, F, P_YES,   P_NO);  // b
      5'd30: d1 = row(RS_PC, RS_X, RS_LR, R2_SIMM11, SH_LSL, SA_12,  ALU_ADD,  F, F, F, P_YES,   P_NO);  // bl1
      5'd31: d1 = row(RS_LR, RS_X, RS_PC, R2_IMM11,  SH_LSL, SA_1,   ALU_ADD,  F, F, F, P_YES,   P_YES); // bl2
      default: d1 = MISSING;  // 8 handled below; 14-17, 23-25, 29 missing
    endcase
  end

  // Table 2: instr[9:6], instr[15:10] = 010000. Shifts swap ra and rb.
  always_comb begin
    unique case (instr[9:6])
      4'd0:  d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_AND, F, F, T, P_YES, P_NO);  // ands
      4'd1:  d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_EOR, F, F, T, P_YES, P_NO);  // eors
      4'd2:  d2 = row(RS_Y, RS_X, RS_X, R2_REGB, SH_LSL, SA_REG, ALU_MOV, F, F, T, P_YES, P_NO);  // lsls
      4'd3:  d2 = row(RS_Y, RS_X, RS_X, R2_REGB, SH_LSR, SA_REG, ALU_MOV, F, F, T, P_YES, P_NO);  // lsrs
      4'd4:  d2 = row(RS_Y, RS_X, RS_X, R2_REGB, SH_ASR, SA_REG, ALU_MOV, F, F, T, P_YES, P_NO);  // asrs
      4'd5:  d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_ADC, F, F, T, P_YES, P_NO);  // adcs
      4'd6:  d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_SBC, F, F, T, P_YES, P_NO);  // sbcs
      4'd7:  d2 = row(RS_Y, RS_X, RS_X, R2_REGB, SH_ROR, SA_REG, ALU_MOV, F, F, T, P_YES, P_NO);  // rors
      4'd8:  d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_AND, F, F, T, P_NO,  P_NO);  // tst
      4'd9:  d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_NEG, F, F, T, P_YES, P_NO);  // negs
      4'd10: d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_SUB, F, F, T, P_NO,  P_NO);  // cmp
      4'd11: d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_ADD, F, F, T, P_NO,  P_NO);  // cmn
      4'd12: d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_ORR, F, F, T, P_YES, P_NO);  // orrs
      4'd13: d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_MUL, F, F, T, P_YES, P_NO);  // muls
      4'd14: d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0,   ALU_BIC, F, F, T, P_YES, P_NO);  // bics
      default: d2 = row(RS_X, RS_Y, RS_X, R2_REGB, SH_LSL, SA_0, ALU_MVN, F, F, T, P_YES, P_NO);  // mvns
    endcase
  end

  // Table 3: instr[9:8], instr[15:10] = 010001.
  always_comb begin
    unique case (instr[9:8])
      2'd0:    d3 = row(RS_XX, RS_YY, RS_XX, R2_REGB, SH_LSL, SA_0, ALU_ADD, F, F, F, P_YES, P_NO);    // add hi
      2'd1:    d3 = row(RS_XX, RS_YY, RS_X,  R2_REGB, SH_LSL, SA_0, ALU_SUB, F, F, T, P_NO,  P_NO);    // cmp hi
      2'd2:    d3 = row(RS_X,  RS_YY, RS_XX, R2_REGB, SH_LSL, SA_0, ALU_MOV, F, F, F, P_YES, P_NO);    // mov hi
      default: d3 = row(RS_X,  RS_YY, RS_PC, R2_REGB, SH_LSL, SA_0, ALU_MOV, F, F, F, P_YES, P_MAYBE); // bx/blx
    endcase
  end

  always_comb begin
    if (instr[15:11] != 5'd8) ctrl = d1;
    else if (!instr[10])      ctrl = d2;
    else                      ctrl = d3;
  end
endmodule
