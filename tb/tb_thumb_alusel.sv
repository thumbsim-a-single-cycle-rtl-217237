// tb_thumb_alusel: checks that Bit7/Bit9 resolve to Add or Sub from the
// instruction and that every other operation passes unchanged.
module tb_thumb_alusel;
  import thumb_pkg::*;
  alu_op_e op_in, op_out, exp;
  half_t instr;
  int checks = 0, failures = 0;

  thumb_alusel dut (.op_in, .instr, .op_out);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 15; k++) repeat (20) begin
      op_in = alu_op_e'(k); instr = 16'($urandom);
      #1;
      if (k == 13)      exp = ((instr >> 7) % 2 == 1) ? ALU_SUB : ALU_ADD;
      else if (k == 14) exp = ((instr >> 9) % 2 == 1) ? ALU_SUB : ALU_ADD;
      else              exp = alu_op_e'(k);
      checks++;
      if (op_out !== exp) begin
        failures++; $display("FAIL in=%0d instr=%h got %0d exp %0d", k, instr, op_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
