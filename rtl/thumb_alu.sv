// thumb_alu: arithmetic-logic unit of the single-cycle Thumb machine.
//
// Inputs: the operation, the two operands in1 (register ra) and in2 (the
// barrel-shifter output), the current C flag cin (for ADC/SBC) and the
// shifter carry shc. Outputs: the result and new NZCV flags.
//   ADD/SUB/ADC/SBC/NEG  use the shared adder, which supplies C and V
//                        (SUB = in1 + ~in2 + 1, NEG = 0 + ~in2 + 1)
//   AND/EOR/ORR/BIC      bitwise, C = V = 0
//   MUL                  low 32 bits of the product, C = V = 0
//   MOV/MVN              in2 or ~in2, C = shc, V = 0
//   ADR                  (in1 + in2) rounded down to a multiple of 4; flags
//                        are never saved for it
// N is bit 31 of the result and Z is set when the result is zero, for every
// operation. Any instruction that writes flags writes all four.
// Purely combinational.
module thumb_alu
  import thumb_pkg::*;
(
  input  alu_op_e op,
  input  word_t   in1,
  input  word_t   in2,
  input  logic    cin,
  input  logic    shc,
  output word_t   result,
  output flags_t  flags
);
  word_t add_a, add_b, add_r;
  logic  add_cin, add_c, add_v;

  // Operand steering for the shared adder.
  always_comb begin
    add_a   = in1;
    add_b   = in2;
    add_cin = 1'b0;
    unique case (op)
      ALU_SUB: begin add_b = ~in2; add_cin = 1'b1; end
      ALU_ADC: begin add_cin = cin; end
      ALU_SBC: begin add_b = ~in2; add_cin = cin; end
      ALU_NEG: begin add_a = '0; add_b = ~in2; add_cin = 1'b1; end
      default: ;
    endcase
  end

  thumb_adder u_adder (
    .a(add_a), .b(add_b), .cin(add_cin), .r(add_r), .cout(add_c), .vout(add_v)
  );

  logic c_out, v_out;

  always_comb begin
    c_out = 1'b0;
    v_out = 1'b0;
    unique case (op)
      ALU_ADD, ALU_SUB, ALU_ADC, ALU_SBC, ALU_NEG: begin
        result = add_r;
        c_out  = add_c;
        v_out  = add_v;
      end
      ALU_AND: result = in1 & in2;
      ALU_EOR: result = in1 ^ in2;
      ALU_ORR: result = in1 | in2;
      ALU_BIC: result = in1 & ~in2;
      ALU_MUL: result = in1 * in2;
      ALU_MOV: begin result = in2;  c_out = shc; end
      ALU_MVN: begin result = ~in2; c_out = shc; end
      ALU_ADR: result = (in1 + in2) & ~32'h3;
      default: result = add_r;
    endcase
    flags = '{n: result[31], z: (result == '0), c: c_out, v: v_out};
  end
endmodule
