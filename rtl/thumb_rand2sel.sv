// thumb_rand2sel: selects the value fed to the barrel shifter (the second
// ALU operand before shifting).
//
//   R2_REGB   rb
//   R2_RIMM3  instr[10] ? zero-extended instr[8:6] : rb  (add/sub reg or imm3)
//   R2_IMM5   instr[10:6]       R2_IMM7  instr[6:0]      R2_IMM8 instr[7:0]
//   R2_SIMM8  sign-extended instr[7:0]
//   R2_IMM11  instr[10:0]       R2_SIMM11 sign-extended instr[10:0]
// Purely combinational.
module thumb_rand2sel
  import thumb_pkg::*;
(
  input  rand2_sel_e sel,
  input  word_t      rb,
  input  half_t      instr,
  output word_t      shiftin
);
  always_comb begin
    unique case (sel)
      R2_REGB:   shiftin = rb;
      R2_RIMM3:  shiftin = instr[10] ? {29'd0, instr[8:6]} : rb;
      R2_IMM5:   shiftin = {27'd0, instr[10:6]};
      R2_IMM7:   shiftin = {25'd0, instr[6:0]};
      R2_IMM8:   shiftin = {24'd0, instr[7:0]};
      R2_SIMM8:  shiftin = {{24{instr[7]}}, instr[7:0]};
      R2_IMM11:  shiftin = {21'd0, instr[10:0]};
      R2_SIMM11: shiftin = {{21{instr[10]}}, instr[10:0]};
      default:   shiftin = rb;
    endcase
  end
endmodule
