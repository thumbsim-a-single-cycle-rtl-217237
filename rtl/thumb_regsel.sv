// thumb_regsel: register-number multiplexer.
//
// Turns a register selector from the decoding tables into a four-bit
// register number, taken either from an instruction field or from a constant:
//   RS_X  instr[2:0]           RS_Y  instr[5:3]        RS_Z instr[8:6]
//   RS_W  instr[10:8]          RS_XX {instr[7],instr[2:0]}
//   RS_YY instr[6:3]           RS_SP 13   RS_LR 14   RS_PC 15
// Purely combinational.
module thumb_regsel
  import thumb_pkg::*;
(
  input  reg_sel_e   sel,
  input  half_t      instr,
  output logic [3:0] regno
);
  always_comb begin
    unique case (sel)
      RS_X:    regno = {1'b0, instr[2:0]};
      RS_Y:    regno = {1'b0, instr[5:3]};
      RS_Z:    regno = {1'b0, instr[8:6]};
      RS_W:    regno = {1'b0, instr[10:8]};
      RS_XX:   regno = {instr[7], instr[2:0]};
      RS_YY:   regno = instr[6:3];
      RS_SP:   regno = 4'(REG_SP);
      RS_LR:   regno = 4'(REG_LR);
      RS_PC:   regno = 4'(REG_PC);
      default: regno = 4'd0;
    endcase
  end
endmodule
