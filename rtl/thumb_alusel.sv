// thumb_alusel: fixes the ALU operation before it reaches the ALU.
//
// The decoding tables may name two placeholder operations, ALU_BIT7 and
// ALU_BIT9, meaning "Sub if instruction bit 7 (resp. 9) is set, else Add".
// This multiplexer resolves them from the instruction; every other
// operation passes unchanged. Purely combinational.
module thumb_alusel
  import thumb_pkg::*;
(
  input  alu_op_e op_in,
  input  half_t   instr,
  output alu_op_e op_out
);
  always_comb begin
    unique case (op_in)
      ALU_BIT7: op_out = instr[7] ? ALU_SUB : ALU_ADD;
      ALU_BIT9: op_out = instr[9] ? ALU_SUB : ALU_ADD;
      default:  op_out = op_in;
    endcase
  end
endmodule
