// tb_thumb_rand2sel: checks each second-operand source, including sign
// extension of the 8- and 11-bit branch offsets and the register/imm3 choice.
module tb_thumb_rand2sel;
  import thumb_pkg::*;
  rand2_sel_e sel;
  word_t rb, shiftin;
  half_t instr;
  int checks = 0, failures = 0;

  thumb_rand2sel dut (.sel, .rb, .instr, .shiftin);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rand2_sel_e sels [8] = '{R2_REGB, R2_RIMM3, R2_IMM5, R2_IMM7, R2_IMM8, R2_SIMM8, R2_IMM11, R2_SIMM11};
    int exp;
    repeat (300) foreach (sels[k]) begin
      sel = sels[k]; rb = $urandom; instr = 16'($urandom);
      #1;
      case (k)
        0: exp = int'(rb);
        1: exp = instr[10] ? int'((instr >> 6) % 8) : int'(rb);
        2: exp = (instr >> 6) % 32;
        3: exp = instr % 128;
        4: exp = instr % 256;
        5: exp = (instr % 256 >= 128) ? int'(instr % 256) - 256 : int'(instr % 256);
        6: exp = instr % 2048;
        default: exp = (instr % 2048 >= 1024) ? int'(instr % 2048) - 2048 : int'(instr % 2048);
      endcase
      checks++;
      if (shiftin !== 32'(exp)) begin
        failures++; $display("FAIL sel=%s instr=%h got %h exp %h", sel.name(), instr, shiftin, 32'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
